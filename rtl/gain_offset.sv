// Gain and offset correction into engineering units.
//
// For every channel: y = saturate16(((x - offset) * gain) >>> FRAC), with the
// gain a signed fixed-point number with FRAC fraction bits (Q8.8 by default,
// 256 = 1.0) and the offset in input counts. Applying the correction in the
// digital chain, so that no tools are needed to adjust a channel, follows the
// requirements; the number format and saturation are this design's choice.
// Timing: one register stage, out_valid follows in_valid by one clock.
module gain_offset #(
  parameter int NCH  = 32,
  parameter int W    = 16,
  parameter int FRAC = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data [NCH],
  input  logic signed [W-1:0] gain    [NCH],
  input  logic signed [W-1:0] offset  [NCH],
  output logic                out_valid,
  output logic signed [W-1:0] out_data [NCH]
);
  localparam logic signed [2*W+1:0] MAXV = (2*W+2)'((1 << (W-1)) - 1);
  localparam logic signed [2*W+1:0] MINV = -(2*W+2)'(1 << (W-1));

  function automatic logic signed [W-1:0] correct(logic signed [W-1:0] x,
                                                  logic signed [W-1:0] g,
                                                  logic signed [W-1:0] o);
    logic signed [W:0]     d;
    logic signed [2*W+1:0] p;
    d = (W+1)'(x) - (W+1)'(o);
    p = ((2*W+2)'(d) * (2*W+2)'(g)) >>> FRAC;
    if (p > MAXV)      return W'(MAXV);
    else if (p < MINV) return W'(MINV);
    else               return W'(p);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int c = 0; c < NCH; c++) out_data[c] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int c = 0; c < NCH; c++) out_data[c] <= correct(in_data[c], gain[c], offset[c]);
    end
  end
endmodule
