// Testbench for section_fpga at a reduced clock (1 MHz, so 1 us = 1 clock
// and 1 ms = 1000 clocks), ADC at 125 kHz and a 1024-word memory.
// An ADC model answers every convert strobe with fixed codes. The test loads
// a configuration and its CRC and checks the unit becomes ready; reads the
// corrected values (4 x code, minus offset, times gain); checks the ADC rate
// and the 16-sample frame rate; records frames and reads them back; raises a
// module overcurrent and checks the Level 1 lines (line XOR clock), the
// latched fault register and the time-stamped change-of-state entry; resets
// the fault; and checks the key-switch lock and the DCCT registers.
module tb_section_fpga;
  import fd_pkg::*;
  localparam int NM = 32, NW = 2*NM + N_TRIP;
  logic clk = 0, rst_n = 0;
  logic adc_convert, adc_valid = 0;
  logic signed [13:0] adc_data [NM];
  section_din_t din;
  logic signed [15:0] supply_mv [N_SUPPLY] = SUPPLY_NOM_MV;
  logic unlock = 0, rec_trigger = 0, fault_clk;
  logic [11:0] dcct_ok = 12'hA5C, dcct_en;
  logic [N_ACT-1:0] fault_line;
  logic bus_sel = 1, bus_wr = 0, bus_rd = 0;
  logic [11:0] bus_addr = 0;
  logic [15:0] bus_wdata = 0, bus_rdata;
  logic [15:0] cfg [NW+1];
  logic signed [13:0] code [NM];
  int checks = 0, failures = 0, nconv = 0, ncyc = 0;

  section_fpga #(.CLK_HZ(1_000_000), .ADC_HZ(125_000), .MEM_AW(10)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) ncyc++;
  // ADC model: data valid two clocks after the convert strobe
  always @(posedge clk) begin
    adc_valid <= 1'b0;
    if (adc_convert) begin
      nconv++;
      repeat (1) @(posedge clk);
      for (int c = 0; c < NM; c++) adc_data[c] <= code[c];
      adc_valid <= 1'b1;
    end
  end
  initial begin
    repeat (200000) @(posedge clk);
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
    p = (longint'(4 * int'(code[c])) - longint'($signed(cfg[NM+c]))) * longint'($signed(cfg[c]));
    p = (p >= 0) ? p / 256 : -((-p + 255) / 256);
    return int'(p);
  endfunction
  initial begin
    logic [15:0] d, st;
    logic [63:0] head;
    int t0, conv0, frame_words;
    for (int c = 0; c < NM; c++) code[c] = 0;
    code[CH_VD] = 14'sd200;  code[CH_ID] = 14'sd500;
    din = '0;
    din.cmd_link_ok = 1; din.fg_ready = 1; din.flow_ok = 1; din.mgd_ok = 1; din.supply_ok = 4'hF;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (1100) @(negedge clk);
    br('h080, st);
    check(st[2] == 1, "not ready before configuration");
    // configuration
    for (int c = 0; c < NM; c++) begin
      cfg[c] = 16'd256 + 16'(c * 8);
      cfg[NM+c] = 16'(c) - 16'd5;
    end
    cfg[2*NM+0] = 1000; cfg[2*NM+1] = 500; cfg[2*NM+2] = 2000; cfg[2*NM+3] = 15000;
    cfg[2*NM+4] = 900;  cfg[2*NM+5] = 50;  cfg[2*NM+6] = 10000; cfg[2*NM+7] = 1000;
    cfg[2*NM+8] = 5000; cfg[2*NM+9] = 350; cfg[2*NM+10] = 10;
    cfg[NW] = crc_of(NW);
    bw(0, 16'd999);                       // locked: ignored
    br(0, d);
    check(d == 16'd256, "locked write ignored");
    @(negedge clk) unlock = 1;
    repeat (3) @(negedge clk);
    for (int a = 0; a <= NW; a++) bw(a, cfg[a]);
    repeat (2200) @(negedge clk);
    br('h080, st);
    check(st[1:0] == 2'b01 && st[2] == 0, $sformatf("ready after configuration, status %h", st));
    din.permissive = 1;
    // corrected values
    for (int c = 0; c < NM; c++) begin
      br('h0C0 + c, d);
      check($signed(d) == corr(c), $sformatf("ch %0d: %0d exp %0d", c, $signed(d), corr(c)));
    end
    // ADC rate: 1 MHz / 125 kHz = 8 clocks per conversion
    conv0 = nconv; t0 = ncyc;
    repeat (800) @(negedge clk);
    check((nconv - conv0) >= 99 && (nconv - conv0) <= 101, $sformatf("ADC rate %0d per 800", nconv - conv0));
    // healthy fault lines toggle with the clock
    // faults seen while the inputs settled after power-up stay latched
    // until the first reset
    br('h082, d);
    check(d[1] == 1, "power-up 1K latched");
    din.reset = 1; repeat (5) @(negedge clk); din.reset = 0;
    repeat (5) @(negedge clk);
    br('h081, d); br('h082, st);
    check(d == 0 && st == 0, "clean after first reset");
    check(fault_line == {N_ACT{fault_clk}}, "healthy lines equal clock");
    begin
      logic c0;
      c0 = fault_clk;
      repeat (1001) @(negedge clk);
      check(fault_clk != c0 && fault_line == {N_ACT{fault_clk}}, "clock toggles every ms");
    end
    // 1K: -15 V supply 12 % low in magnitude trips Level 1 (tolerance 10 %)
    supply_mv[2] = -13200;
    repeat (5) @(negedge clk);
    br('h082, d);
    check(d[1] == 1 && fault_line[A_L1] != fault_clk, "1K from supply voltage window");
    supply_mv[2] = SUPPLY_NOM_MV[2];
    din.reset = 1; repeat (5) @(negedge clk); din.reset = 0;
    repeat (5) @(negedge clk);
    br('h082, d);
    check(d == 0, "1K clears after reset");
    // DCCT source registers
    bw('h089, 12'h3F0);
    check(dcct_en == 12'h3F0, "DCCT enables");
    br('h08A, d);
    check(d == 16'h0A5C, "DCCT status");
    // record: aux 0 = latched faults (0), aux 1 = uncorrected Id
    bw('h088, 4'b1100);
    bw('h090, 1);
    repeat (300) @(negedge clk);
    br('h091, d);
    check(d == 0, "nothing recorded before trigger");
    @(negedge clk) rec_trigger = 1;
    repeat (4) @(negedge clk);
    rec_trigger = 0;
    repeat (128 * 3 + 60) @(negedge clk);
    bw('h090, 2);                         // stop
    repeat (60) @(negedge clk);
    br('h091, d);
    frame_words = int'(d);
    check(frame_words >= 3*34 && frame_words % 34 == 0, $sformatf("recorded %0d words", frame_words));
    br('h080, st);
    check(st[10] == 1 && st[9] == 0, "recorder done");
    bw('h0B0, 0); bw('h0B1, 0);
    for (int w = 0; w < 2*34; w++) begin
      int e;
      br('h0B2, d);
      if (w % 34 < NM) e = corr(w % 34);
      else if (w % 34 == 32) e = 0;
      else e = 4 * int'(code[CH_ID]);
      check($signed(d) == e, $sformatf("mem word %0d: %0d exp %0d", w, $signed(d), e));
    end
    // change-of-state FIFO: drain what is there
    br('h0A0, d);
    while (d != 0) begin bw('h0A5, 0); br('h0A0, d); end
    // module overcurrent: ACCT 4 over 2000 A
    code[4] = 14'sd600;
    repeat (128 * 3) @(negedge clk);
    br('h081, d);
    check(d[7] == 1, $sformatf("1A latched, %h", d));
    check(fault_line[A_L1] != fault_clk && fault_line[A_SUPPRESS] != fault_clk &&
          fault_line[A_FIRE_BP] != fault_clk && fault_line[A_L3] == fault_clk, "Level 1 lines");
    br('h0A0, d);
    check(d >= 1, "change logged");
    begin
      int found;
      found = 0;
      while (d != 0) begin
        br('h0A1, head[15:0]); br('h0A2, head[31:16]); br('h0A3, head[47:32]); br('h0A4, head[63:48]);
        if (head[24+7] && head[24+24] && head[23:0] > 24'd5000) found++;
        bw('h0A5, 0); br('h0A0, d);
      end
      check(found == 1, "one COS entry for the 1A trip");
    end
    // remove cause, reset via the discrete input
    code[4] = 0;
    repeat (128 * 3) @(negedge clk);
    br('h081, d);
    check(d[7] == 1, "still latched");
    din.reset = 1; repeat (5) @(negedge clk); din.reset = 0;
    repeat (5) @(negedge clk);
    br('h081, d);
    check(d == 0, "reset clears");
    check(fault_line == {N_ACT{fault_clk}}, "lines healthy again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
