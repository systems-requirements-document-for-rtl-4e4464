// Testbench for fault_output_driver: the clock line must toggle on every
// tick (every 1 ms, 20 clocks here), and each line must equal clock XOR
// fault, so a line toggles with the clock and inverts when its fault changes.
module tb_fault_output_driver;
  localparam int N = 3;
  logic clk = 0, rst_n = 0, tick_ms = 0, clk_line;
  logic [N-1:0] fault = '0, line;
  int checks = 0, failures = 0;
  fault_output_driver #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic prev_clk;
    int edges;
    edges = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    prev_clk = clk_line;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      tick_ms = (cyc % 20 == 19);
      if (cyc % 97 == 0) fault = N'($urandom);
      @(negedge clk);
      checks++;
      if (line !== ({N{clk_line}} ^ fault)) begin failures++; $display("line %b clk %b fault %b", line, clk_line, fault); end
      checks++;
      if ((clk_line != prev_clk) != (cyc % 20 == 19)) begin failures++; $display("clock edge at wrong time, cyc %0d", cyc); end
      if (clk_line != prev_clk) edges++;
      prev_clk = clk_line;
    end
    checks++;
    if (edges != 100) begin failures++; $display("edges %0d", edges); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
