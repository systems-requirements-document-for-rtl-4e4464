// Testbench for gain_offset: random values, gains and offsets on 4 channels,
// compared with ((x - o) * g) / 256 rounded towards minus infinity and
// saturated to 16 bits, one clock after in_valid.
module tb_gain_offset;
  localparam int NCH = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [15:0] in_data [NCH], gain [NCH], offset [NCH], out_data [NCH];
  int checks = 0, failures = 0;
  gain_offset #(.NCH(NCH), .W(16), .FRAC(8)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic longint ref_val(longint x, longint g, longint o);
    longint p;
    p = (x - o) * g;
    p = (p >= 0) ? p / 256 : -((-p + 255) / 256);
    if (p > 32767) p = 32767;
    if (p < -32768) p = -32768;
    return p;
  endfunction
  initial begin
    int nsat;
    nsat = 0;
    for (int c = 0; c < NCH; c++) begin in_data[c] = 0; gain[c] = 256; offset[c] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int c = 0; c < NCH; c++) begin
        in_data[c] = 16'($urandom);
        offset[c]  = (t % 3 == 0) ? 16'($urandom) : 16'($urandom_range(0, 200)) - 16'sd100;
        gain[c]    = (t % 2 == 0) ? 16'($urandom) : 16'($urandom_range(0, 1024));
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("no out_valid"); end
      for (int c = 0; c < NCH; c++) begin
        longint e;
        e = ref_val(longint'(in_data[c]), longint'(gain[c]), longint'(offset[c]));
        if (e == 32767 || e == -32768) nsat++;
        checks++;
        if (longint'(out_data[c]) != e) begin
          failures++; $display("x=%0d g=%0d o=%0d got %0d exp %0d", in_data[c], gain[c], offset[c], out_data[c], e);
        end
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("out_valid stuck"); end
    end
    checks++;
    if (nsat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
