// Testbench for cos_fifo (64 x {40-bit status, 24-bit stamp}): random status
// changes at random times are compared entry by entry with a queue model,
// including the stamp of each change; unchanged status logs nothing; filling
// beyond 64 entries drops changes and sets the sticky overflow flag.
module tb_cos_fifo;
  logic clk = 0, rst_n = 0, pop = 0, clear_ovf = 0, overflow;
  logic [39:0] status = 40'h12_3456_789A;
  logic [23:0] stamp = 0;
  logic [63:0] head;
  logic [6:0]  count;
  logic [63:0] q [$];
  int checks = 0, failures = 0;
  cos_fifo #(.DEPTH(64), .STATUS_W(40), .STAMP_W(24)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) stamp <= stamp + 1;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic change();
    @(negedge clk);
    status = status ^ (40'(1) << $urandom_range(0, 39));
    q.push_back({status, stamp});   // stamp sampled at the same edge as status
  endtask
  task automatic pop_check();
    @(negedge clk);
    checks++;
    if (head !== q[0]) begin failures++; $display("head %h exp %h", head, q[0]); end
    void'(q.pop_front());
    pop = 1;
    @(negedge clk);
    pop = 0;
  endtask
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    checks++;
    if (count != 0) begin failures++; $display("logged without a change"); end
    for (int r = 0; r < 200; r++) begin
      if ($urandom_range(0, 1)) change();
      else if (q.size() > 0) pop_check();
      repeat ($urandom_range(0, 3)) @(negedge clk);
      @(negedge clk);
      checks++;
      if (count != 7'(q.size())) begin failures++; $display("count %0d exp %0d", count, q.size()); end
    end
    while (q.size() > 0) pop_check();
    // overflow
    for (int i = 0; i < 70; i++) begin
      change();
      if (i >= 64) void'(q.pop_back());
    end
    @(negedge clk);
    checks++;
    if (count != 64 || !overflow) begin failures++; $display("overflow: count %0d ovf %b", count, overflow); end
    while (q.size() > 0) pop_check();
    checks++;
    if (!overflow) begin failures++; $display("overflow not sticky"); end
    @(negedge clk) clear_ovf = 1;
    @(negedge clk) clear_ovf = 0;
    checks++;
    if (overflow || count != 0) begin failures++; $display("clear failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
