// Testbench for common_fpga at a 1 MHz clock (1 ms = 1000 clocks), ADC at
// 125 kHz and a 64-word memory (8 frames of 8 channels).
// Section fault lines are generated here: a clock toggling every ms and
// lines equal to clock XOR fault. Checks: configuration with CRC makes the
// unit ready and the watchdog timeout is clamped to its bounds; corrected
// values; decoded section faults and the common fault line that reports
// them; a section line that stops toggling is flagged stuck and raises the
// watchdog fault line; a status input change is logged with its time stamp;
// a recording stops by itself when the memory is full and reads back.
module tb_common_fpga;
  import fd_pkg::*;
  localparam int NC = 8, NW = 2*NC + 1;
  logic clk = 0, rst_n = 0, adc_convert, adc_valid = 0;
  logic signed [13:0] adc_data [NC], code [NC];
  logic [31:0] status_in = 32'h0000_1234;
  logic unlock = 0, rec_trigger = 0, fault_clk;
  logic [1:0] sec_clk = 0, fault_line;
  logic [N_ACT-1:0] sec_line [2], sec_fault [2];
  logic [1:0] hold_line2 = 0;
  logic bus_sel = 1, bus_wr = 0, bus_rd = 0;
  logic [11:0] bus_addr = 0;
  logic [15:0] bus_wdata = 0, bus_rdata;
  logic [15:0] cfg [NW+1];
  int checks = 0, failures = 0, ncyc = 0;

  common_fpga #(.CLK_HZ(1_000_000), .ADC_HZ(125_000), .MEM_AW(6)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    adc_valid <= adc_convert;
    if (adc_convert) for (int c = 0; c < NC; c++) adc_data[c] <= code[c];
  end
  // section line generator
  always @(negedge clk) begin
    ncyc++;
    if (ncyc % 1000 == 0) sec_clk <= ~sec_clk;
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < N_ACT; i++)
        if (!(i == 2 && hold_line2[s])) sec_line[s][i] <= sec_clk[s] ^ sec_fault[s][i];
  end
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic bw(input int a, input int d);
    @(negedge clk); bus_wr = 1; bus_addr = 12'(a); bus_wdata = 16'(d);
    @(negedge clk); bus_wr = 0;
  endtask
  task automatic br(input int a, output logic [15:0] d);
    @(negedge clk); bus_rd = 1; bus_addr = 12'(a);
    @(negedge clk); bus_rd = 0; d = bus_rdata;
    @(negedge clk);
  endtask
  function automatic logic [15:0] crc_of(int n);
    logic [15:0] c;
    c = 16'hFFFF;
    for (int w = 0; w < n; w++)
      for (int i = 15; i >= 0; i--)
        c = (c[15] ^ cfg[w][i]) ? ({c[14:0], 1'b0} ^ 16'h1021) : {c[14:0], 1'b0};
    return c;
  endfunction
  function automatic int corr(int c);
    longint p;
    p = (longint'(4 * int'(code[c])) - longint'($signed(cfg[NC+c]))) * longint'($signed(cfg[c]));
    p = (p >= 0) ? p / 256 : -((-p + 255) / 256);
    return int'(p);
  endfunction
  initial begin
    logic [15:0] d, st;
    logic [63:0] head;
    for (int c = 0; c < NC; c++) code[c] = 14'(100 * c - 300);
    sec_fault[0] = '0; sec_fault[1] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    unlock = 1;
    repeat (5) @(negedge clk);
    for (int c = 0; c < NC; c++) begin cfg[c] = 16'(200 + 20 * c); cfg[NC+c] = 16'(3 * c); end
    bw(2*NC, 5000);
    br(2*NC, d);
    check(d == 2500, "timeout clamped to 2500");
    cfg[2*NC] = 2000;
    cfg[NW] = crc_of(NW);
    for (int a = 0; a <= NW; a++) bw(a, cfg[a]);
    repeat (4500) @(negedge clk);
    br('h080, st);
    check(st[2:1] == 2'b00, $sformatf("ready, status %h", st));
    check(st[3] == 0, "no watchdog fault while lines toggle");
    for (int c = 0; c < NC; c++) begin
      br('h0C0 + c, d);
      check($signed(d) == corr(c), $sformatf("ch %0d %0d exp %0d", c, $signed(d), corr(c)));
    end
    // decoded section faults
    sec_fault[1][A_L3] = 1;
    repeat (50) @(negedge clk);
    br('h083, d);
    check(d == 16'(1 << (6 + A_L3)), $sformatf("decoded %h", d));
    check(fault_line[1] != fault_clk && fault_line[0] == fault_clk, "common line reports section fault");
    sec_fault[1][A_L3] = 0;
    repeat (50) @(negedge clk);
    check(fault_line == {2{fault_clk}}, "common lines healthy");
    // stuck line on section A
    hold_line2[0] = 1;
    repeat (4500) @(negedge clk);
    br('h081, d);
    check(d == 16'h0004, $sformatf("stuck bits A %h", d));
    check(fault_line[0] != fault_clk, "watchdog fault line");
    hold_line2[0] = 0;
    repeat (2100) @(negedge clk);
    br('h081, d);
    check(d == 0, "stuck clears when toggling resumes");
    // change of state of a status input
    br('h0A0, d);
    while (d != 0) begin bw('h0A5, 0); br('h0A0, d); end
    status_in[7] = 1;
    repeat (10) @(negedge clk);
    br('h0A0, d);
    check(d == 1, $sformatf("one COS entry, %0d", d));
    br('h0A1, head[15:0]); br('h0A2, head[31:16]); br('h0A3, head[47:32]); br('h0A4, head[63:48]);
    check(head[24 +: 32] == 32'h0000_12B4, $sformatf("COS status %h", head));
    check(head[23:0] > 24'd10000 && head[23:0] < 24'(ncyc), "COS stamp in us since reset");
    // record until full
    bw('h090, 1);
    @(negedge clk) rec_trigger = 1;
    repeat (4) @(negedge clk);
    rec_trigger = 0;
    repeat (128 * 10) @(negedge clk);
    br('h080, st);
    br('h091, d);
    check(st[7] == 1 && st[6] == 0 && d == 64, $sformatf("full record: status %h words %0d", st, d));
    bw('h0B0, 0); bw('h0B1, 0);
    for (int w = 0; w < 64; w++) begin
      br('h0B2, d);
      check($signed(d) == corr(w % NC), $sformatf("mem %0d", w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
