// Testbench for rate_gen: with en high every other clock and DIV = 5, a tick
// must come every 10 clocks, exactly one clock wide.
module tb_rate_gen;
  logic clk = 0, rst_n = 0, en = 0, tick;
  int checks = 0, failures = 0;
  rate_gen #(.DIV(5)) dut (.clk, .rst_n, .en, .tick);
  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int last, n, cyc;
    last = -1; n = 0; cyc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 400; cyc++) begin
      @(posedge clk);
      en <= (cyc % 2 == 0);
      #1;
      if (tick) begin
        if (last >= 0) begin
          checks++;
          if (cyc - last != 10) begin failures++; $display("interval %0d", cyc - last); end
        end
        last = cyc; n++;
      end
    end
    checks++;
    if (n < 38 || n > 41) begin failures++; $display("tick count %0d", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
