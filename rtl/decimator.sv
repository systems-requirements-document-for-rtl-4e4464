// Decimation filter for the 16x oversampled analog inputs.
//
// All channels are sampled simultaneously, so one in_valid carries a sample of
// every channel. The filter is a sum-and-dump boxcar: it adds OSR consecutive
// samples of each channel and, on the OSR-th, outputs the sum shifted right so
// that the result is OUT_W bits wide (for OSR = 16 and 14-bit inputs the sum
// has 18 bits and is shifted by 2, keeping two bits gained by averaging).
// With the ADC at 128 kHz the output rate is 8 kHz, twice the 4 kHz input
// filter corner. The 16x ratio and the widths follow the requirements; the
// boxcar shape is this design's choice.
// Timing: out_valid rises one clock after the OSR-th in_valid.
module decimator #(
  parameter int NCH   = 32,
  parameter int OSR   = 16,
  parameter int IN_W  = 14,
  parameter int OUT_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data  [NCH],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data [NCH]
);
  localparam int SUM_W = IN_W + $clog2(OSR);
  localparam int SHIFT = (SUM_W > OUT_W) ? SUM_W - OUT_W : 0;
  localparam int PW    = (OSR > 1) ? $clog2(OSR) : 1;

  logic signed [SUM_W-1:0] acc [NCH];
  logic [PW-1:0]           phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      out_valid <= 1'b0;
      for (int c = 0; c < NCH; c++) begin
        acc[c]      <= '0;
        out_data[c] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (phase == PW'(OSR - 1)) begin
          phase     <= '0;
          out_valid <= 1'b1;
          for (int c = 0; c < NCH; c++) begin
            out_data[c] <= OUT_W'((acc[c] + SUM_W'(in_data[c])) >>> SHIFT);
            acc[c]      <= '0;
          end
        end else begin
          phase <= phase + 1'b1;
          for (int c = 0; c < NCH; c++) acc[c] <= acc[c] + SUM_W'(in_data[c]);
        end
      end
    end
  end
endmodule
