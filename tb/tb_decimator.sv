// Testbench for decimator: random 14-bit samples on 3 channels, gaps between
// samples; every 16th sample must produce the sum of the last 16 shifted
// right by 2, one clock after the 16th sample.
module tb_decimator;
  localparam int NCH = 3;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [13:0] in_data [NCH];
  logic signed [15:0] out_data [NCH];
  int checks = 0, failures = 0;
  decimator #(.NCH(NCH), .OSR(16), .IN_W(14), .OUT_W(16)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    longint sum [NCH];
    int k;
    for (int c = 0; c < NCH; c++) begin sum[c] = 0; in_data[c] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 20; f++) begin
      for (k = 0; k < 16; k++) begin
        @(negedge clk);
        in_valid = 1;
        for (int c = 0; c < NCH; c++) begin
          in_data[c] = 14'($urandom);
          if (f == 3) in_data[c] = 14'sh1FFF;    // full scale positive
          if (f == 4) in_data[c] = -14'sh2000;   // full scale negative
          sum[c] += longint'(in_data[c]);
        end
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (out_valid != (k == 15)) begin failures++; $display("valid timing f=%0d k=%0d", f, k); end
        if (k == 15)
          for (int c = 0; c < NCH; c++) begin
            checks++;
            if (longint'(out_data[c]) != (sum[c] >>> 2)) begin
              failures++; $display("f=%0d c=%0d got %0d exp %0d", f, c, out_data[c], sum[c] >>> 2);
            end
            sum[c] = 0;
          end
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
