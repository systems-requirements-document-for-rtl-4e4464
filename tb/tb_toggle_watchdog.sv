// Testbench for toggle_watchdog: a clock and three lines toggle every 10 us
// (tick_us every 2 clocks) with faults XORed in; the decoded faults must match
// after the synchroniser delay. A line held still for longer than the 25 us
// timeout must set its stuck bit and wd_fault; toggling again clears it.
module tb_toggle_watchdog;
  localparam int N = 3;
  logic clk = 0, rst_n = 0, tick_us = 0, clk_line = 0;
  logic [N-1:0] line = '0, decoded, fault = '0, hold = '0;
  logic [N:0] stuck;
  logic wd_fault, hold_clk = 0;
  logic [15:0] timeout_us = 16'd25;
  int checks = 0, failures = 0;
  int cyc = 0;
  toggle_watchdog #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // stimulus: toggle every 20 clocks
  always @(negedge clk) if (rst_n) begin
    cyc++;
    tick_us <= (cyc % 2 == 0);
    if (cyc % 20 == 0) begin
      if (!hold_clk) clk_line <= ~clk_line;
      for (int i = 0; i < N; i++) if (!hold[i]) line[i] <= ~clk_line ^ fault[i];
    end
  end
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (200) @(negedge clk);
    for (int k = 0; k < 8; k++) begin
      fault = N'(k);
      repeat (45) @(negedge clk);
      checks++;
      if (decoded !== fault) begin failures++; $display("decoded %b exp %b", decoded, fault); end
      checks++;
      if (wd_fault) begin failures++; $display("false watchdog %b", stuck); end
    end
    // stop line 1
    hold = 3'b010;
    repeat (120) @(negedge clk);
    checks++;
    if (stuck !== 4'b0010 || !wd_fault) begin failures++; $display("stuck %b", stuck); end
    hold = '0;
    repeat (60) @(negedge clk);
    checks++;
    if (stuck !== '0 || wd_fault) begin failures++; $display("not cleared %b", stuck); end
    // stop the clock line
    hold_clk = 1;
    repeat (120) @(negedge clk);
    checks++;
    if (!stuck[N]) begin failures++; $display("clock stop missed %b", stuck); end
    // short pause below the timeout must not trip
    hold_clk = 0;
    repeat (60) @(negedge clk);
    checks++;
    if (wd_fault) begin failures++; $display("stuck after recovery %b", stuck); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
