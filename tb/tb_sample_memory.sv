// Testbench for sample_memory: writes a pattern to every word of a 64-word
// memory, reads it back with the one-clock latency and checks each word.
module tb_sample_memory;
  localparam int AW = 6;
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [2**AW];
  int checks = 0, failures = 0;
  sample_memory #(.AW(AW), .DW(16)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      for (int a = 0; a < 2**AW; a++) begin
        @(negedge clk);
        we = 1; waddr = AW'(a); wdata = 16'($urandom); model[a] = wdata;
      end
      @(negedge clk) we = 0;
      for (int a = 0; a < 2**AW; a++) begin
        raddr = AW'(a ^ 5);
        @(negedge clk);
        checks++;
        if (rdata !== model[a ^ 5]) begin failures++; $display("a=%0d got %h exp %h", a ^ 5, rdata, model[a ^ 5]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
