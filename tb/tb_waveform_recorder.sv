// Testbench for waveform_recorder with 3 channels and a 16-word memory:
// frames before arming or before the trigger are not recorded; after the
// trigger every frame is written at consecutive addresses, channel 0 first,
// until 5 whole frames (15 words) fill the memory and done rises; a second
// record can be stopped early.
module tb_waveform_recorder;
  localparam int NCH = 3, AW = 4;
  logic clk = 0, rst_n = 0, arm = 0, stop = 0, trigger = 0, in_valid = 0;
  logic [15:0] in_data [NCH];
  logic mem_we, armed, recording, done;
  logic [AW-1:0] mem_addr;
  logic [15:0] mem_wdata;
  logic [AW:0] words;
  logic [15:0] mem [2**AW];
  logic [15:0] exp_q [$];
  int checks = 0, failures = 0, nwr = 0;
  waveform_recorder #(.NCH(NCH), .AW(AW), .DW(16)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && mem_we) begin mem[mem_addr] <= mem_wdata; nwr++; end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic frame(input bit expect_rec);
    @(negedge clk);
    for (int c = 0; c < NCH; c++) begin
      in_data[c] = 16'($urandom);
      if (expect_rec) exp_q.push_back(in_data[c]);
    end
    in_valid = 1;
    @(negedge clk) in_valid = 0;
    repeat (8) @(negedge clk);
  endtask
  initial begin
    for (int c = 0; c < NCH; c++) in_data[c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    frame(0);
    @(negedge clk) trigger = 1;             // trigger before arming: ignored
    @(negedge clk) trigger = 0;
    frame(0);
    checks++;
    if (nwr != 0 || recording) begin failures++; $display("recorded while not armed"); end
    @(negedge clk) arm = 1;
    @(negedge clk) arm = 0;
    frame(0);
    checks++;
    if (!armed || nwr != 0) begin failures++; $display("armed %b nwr %0d", armed, nwr); end
    @(negedge clk) trigger = 1;
    @(negedge clk) trigger = 0;
    for (int f = 0; f < 7; f++) frame(f < 5);
    checks++;
    if (!done || recording || nwr != 15 || words != 15) begin
      failures++; $display("done %b rec %b nwr %0d words %0d", done, recording, nwr, words);
    end
    for (int a = 0; a < 15; a++) begin
      checks++;
      if (mem[a] !== exp_q[a]) begin failures++; $display("mem[%0d] %h exp %h", a, mem[a], exp_q[a]); end
    end
    // second record, stopped after two frames
    exp_q.delete(); nwr = 0;
    @(negedge clk) arm = 1;
    @(negedge clk) arm = 0; trigger = 1;
    @(negedge clk) trigger = 0;
    frame(1); frame(1);
    @(negedge clk) stop = 1;
    @(negedge clk) stop = 0;
    frame(0);
    checks++;
    if (!done || nwr != 6) begin failures++; $display("stop: done %b nwr %0d", done, nwr); end
    for (int a = 0; a < 6; a++) begin
      checks++;
      if (mem[a] !== exp_q[a]) begin failures++; $display("mem2[%0d] %h exp %h", a, mem[a], exp_q[a]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
