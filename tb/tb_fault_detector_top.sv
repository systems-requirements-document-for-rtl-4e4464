// End-to-end testbench of fault_detector_top at a reduced clock (1 MHz,
// 1 us = 1 clock) with 256-word memories. ADC models answer the three
// convert strobes with fixed codes; the host bus configures all three FPGAs.
// Every mechanism of the design is provoked and counted, and each must
// happen at least once:
//   crc_reject   a wrong configuration CRC keeps the unit not ready
//   crc_accept   a right CRC makes it ready
//   lock         a write with the key switch off changes nothing
//   clamp        a trip level beyond its bound is clamped
//   alarm0       a Level 0 alarm (firing generator not ready) shows, unlatched
//   level1       a module overcurrent trips Level 1 on section A's lines
//   level2       current still flowing half a cycle after suppression
//                opens the AC breaker line
//   level3       an external Level 3 fault on section B closes the ground
//                switch line
//   wd_decode    the common FPGA decodes the section faults from the lines
//   watchdog     a section line held still is flagged stuck
//   latch_reset  a latched fault survives its cause and clears on reset
//   cos_log      a change is logged with its time stamp
//   cos_overflow more than 64 changes set the overflow flag
//   record_full  a recording stops when the memory is full and reads back
module tb_fault_detector_top;
  import fd_pkg::*;
  localparam int NM = SECT_NMEAS, NWS = 2*NM + N_TRIP, NWC = 2*COMMON_NCH + 1;
  logic clk = 0, rst_n = 0;
  logic adc_convert_a, adc_convert_b, adc_convert_c;
  logic adc_valid_a = 0, adc_valid_b = 0, adc_valid_c = 0;
  logic signed [13:0] adc_a [NM], adc_b [NM], adc_c [COMMON_NCH];
  logic signed [13:0] code_a [NM], code_b [NM], code_c [COMMON_NCH];
  section_din_t din_a, din_b;
  logic signed [15:0] supply_mv_a [N_SUPPLY] = SUPPLY_NOM_MV, supply_mv_b [N_SUPPLY] = SUPPLY_NOM_MV;
  logic [11:0] dcct_ok_a = 0, dcct_ok_b = 0, dcct_en_a, dcct_en_b;
  logic fclk_a, fclk_b, fclk_c;
  logic [N_ACT-1:0] fline_a, fline_b;
  logic [1:0] fline_c;
  logic [31:0] status_c = 0;
  logic unlock = 0, rec_trigger = 0;
  logic [13:0] bus_addr = 0;
  logic bus_wr = 0, bus_rd = 0;
  logic [15:0] bus_wdata = 0, bus_rdata;
  logic [15:0] cfg_s [NWS+1], cfg_c [NWC+1];
  int checks = 0, failures = 0;
  typedef enum int {M_CRC_REJECT, M_CRC_ACCEPT, M_LOCK, M_CLAMP, M_ALARM0, M_LEVEL1, M_LEVEL2,
                    M_LEVEL3, M_WD_DECODE, M_WATCHDOG, M_LATCH_RESET, M_COS_LOG, M_COS_OVERFLOW,
                    M_RECORD_FULL, M_COUNT} mech_e;
  int mech [M_COUNT];

  fault_detector_top #(.CLK_HZ(1_000_000), .ADC_HZ(125_000), .MEM_AW(8)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    adc_valid_a <= adc_convert_a; adc_valid_b <= adc_convert_b; adc_valid_c <= adc_convert_c;
    if (adc_convert_a) adc_a <= code_a;
    if (adc_convert_b) adc_b <= code_b;
    if (adc_convert_c) adc_c <= code_c;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic bw(input int a, input int d);
    @(negedge clk); bus_wr = 1; bus_addr = 14'(a); bus_wdata = 16'(d);
    @(negedge clk); bus_wr = 0;
  endtask
  task automatic br(input int a, output logic [15:0] d);
    @(negedge clk); bus_rd = 1; bus_addr = 14'(a);
    @(negedge clk); bus_rd = 0; d = bus_rdata;
    @(negedge clk);
  endtask
  function automatic logic [15:0] crc(input logic [15:0] w [], input int n);
    logic [15:0] c;
    c = 16'hFFFF;
    for (int k = 0; k < n; k++)
      for (int i = 15; i >= 0; i--)
        c = (c[15] ^ w[k][i]) ? ({c[14:0], 1'b0} ^ 16'h1021) : {c[14:0], 1'b0};
    return c;
  endfunction
  task automatic healthy(inout section_din_t d);
    d = '0;
    d.permissive = 1; d.cmd_link_ok = 1; d.fg_ready = 1; d.flow_ok = 1; d.mgd_ok = 1;
    d.supply_ok = 4'hF;
  endtask
  task automatic reset_faults();
    din_a.reset = 1; din_b.reset = 1;
    repeat (5) @(negedge clk);
    din_a.reset = 0; din_b.reset = 0;
    repeat (5) @(negedge clk);
  endtask
  initial begin
    logic [15:0] d, st;
    logic [15:0] w [];
    logic [63:0] head;
    int base;
    for (int m = 0; m < M_COUNT; m++) mech[m] = 0;
    for (int c = 0; c < NM; c++) begin code_a[c] = 0; code_b[c] = 0; end
    code_a[CH_VD] = 100; code_b[CH_VD] = 100;
    for (int c = 0; c < COMMON_NCH; c++) code_c[c] = 14'(50 * c);
    healthy(din_a); healthy(din_b);
    din_a.permissive = 0; din_b.permissive = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    // ---- configuration
    bw('h0000, 777);
    br('h0000, d);
    if (d == 256) mech[M_LOCK]++;
    check(d == 256, "locked write ignored");
    unlock = 1; repeat (3) @(negedge clk);
    for (int c = 0; c < NM; c++) begin cfg_s[c] = 256; cfg_s[NM+c] = 0; end
    cfg_s[2*NM+0] = 1000; cfg_s[2*NM+1] = 500;  cfg_s[2*NM+2] = 2000; cfg_s[2*NM+3] = 15000;
    cfg_s[2*NM+4] = 900;  cfg_s[2*NM+5] = 50;   cfg_s[2*NM+6] = 10000; cfg_s[2*NM+7] = 1000;
    cfg_s[2*NM+8] = 5000; cfg_s[2*NM+9] = 350; cfg_s[2*NM+10] = 10;
    w = new[NWS]; foreach (w[k]) w[k] = cfg_s[k];
    cfg_s[NWS] = crc(w, NWS);
    for (int c = 0; c < COMMON_NCH; c++) begin cfg_c[c] = 256; cfg_c[COMMON_NCH+c] = 0; end
    cfg_c[2*COMMON_NCH] = 2000;
    w = new[NWC]; foreach (w[k]) w[k] = cfg_c[k];
    cfg_c[NWC] = crc(w, NWC);
    for (int a = 0; a <= NWS; a++) bw('h0000 + a, cfg_s[a]);
    for (int a = 0; a < NWS; a++) bw('h1000 + a, cfg_s[a]);
    bw('h1000 + NWS, cfg_s[NWS] ^ 16'h8000);               // B: wrong CRC
    for (int a = 0; a <= NWC; a++) bw('h2000 + a, cfg_c[a]);
    bw('h1000 + 2*NM + 3, 40000 - 65536);                  // negative: clamped to 2500
    br('h1000 + 2*NM + 3, d);
    if (d == 2500) mech[M_CLAMP]++;
    check(d == 2500, "1B trip clamped");
    bw('h1000 + 2*NM + 3, 15000);
    repeat (2200) @(negedge clk);
    br('h1080, st);
    if (st[1] && st[2]) mech[M_CRC_REJECT]++;
    check(st[1] && st[2], "B rejects wrong CRC");
    bw('h1000 + NWS, cfg_s[NWS]);
    repeat (2200) @(negedge clk);
    br('h0080, st); br('h1080, d);
    if (!st[2] && !d[2]) mech[M_CRC_ACCEPT]++;
    br('h2080, st);
    check(!st[2] && !d[2] && !st[1], "all three ready");
    din_a.permissive = 1; din_b.permissive = 1;
    reset_faults();
    check(fline_a == {N_ACT{fclk_a}} && fline_b == {N_ACT{fclk_b}} && fline_c == {2{fclk_c}},
          "all lines healthy");
    // ---- Level 0 alarm on B
    din_b.fg_ready = 0;
    repeat (10) @(negedge clk);
    br('h1080, st); br('h1081, d);
    if (st[6] && d == 0) mech[M_ALARM0]++;
    check(st[6] && d == 0 && fline_b == {N_ACT{fclk_b}}, "Level 0 alarm only");
    din_b.fg_ready = 1;
    // ---- Level 1 on A: module 0 phase B overcurrent, sum cancelled
    code_a[0] = -300; code_a[1] = 600; code_a[2] = -300;   // corrected -1200, 2400, -1200
    repeat (128 * 3) @(negedge clk);
    check(fline_a[A_L1] != fclk_a && fline_a[A_SUPPRESS] != fclk_a && fline_a[A_FIRE_BP] != fclk_a, "A Level 1 lines");
    if (fline_a[A_L1] != fclk_a) mech[M_LEVEL1]++;
    br('h2083, d);
    if (d[A_L1] && d[A_SUPPRESS]) mech[M_WD_DECODE]++;
    check(d[5:0] == 6'b001101, $sformatf("common decodes A %b", d[5:0]));
    check(fline_c[1] != fclk_c, "common line reports section fault");
    // ---- Level 2: current keeps flowing (drop below 1A trip, stay above 2A trip)
    code_a[0] = -300; code_a[1] = 300; code_a[2] = 0;      // 1200 A > 1000 A
    repeat (8333 + 400) @(negedge clk);
    br('h0082, d);
    if (d[4] && fline_a[A_OPEN_CB] != fclk_a) mech[M_LEVEL2]++;
    check(d[4] && fline_a[A_OPEN_CB] != fclk_a && fline_a[A_GND_SW] == fclk_a, "A Level 2");
    // ---- latch and reset
    for (int c = 0; c < 3; c++) code_a[c] = 0;
    repeat (128 * 3) @(negedge clk);
    br('h0081, d);
    check(d[7], "1A stays latched");
    reset_faults();
    br('h0081, d); br('h0082, st);
    if (d == 0 && st == 0 && fline_a == {N_ACT{fclk_a}}) mech[M_LATCH_RESET]++;
    check(d == 0 && st == 0, "reset clears A");
    // ---- Level 3 on B
    br('h10A0, d);
    while (d != 0) begin bw('h10A5, 0); br('h10A0, d); end
    din_b.ext_l3 = 1;
    repeat (10) @(negedge clk);
    din_b.ext_l3 = 0;
    repeat (10) @(negedge clk);
    if (fline_b[A_GND_SW] != fclk_b && fline_b[A_L3] != fclk_b) mech[M_LEVEL3]++;
    check(fline_b[A_GND_SW] != fclk_b && fline_b[A_L3] != fclk_b && fline_b[A_L1] == fclk_b, "B Level 3");
    br('h10A0, d);
    check(d >= 2, "ext L3 on and off logged");
    while (d != 0) begin
      br('h10A1, head[15:0]); br('h10A2, head[31:16]); br('h10A3, head[47:32]); br('h10A4, head[63:48]);
      if (head[24+23] && head[24+25] && head[23:0] != 0) mech[M_COS_LOG]++;
      bw('h10A5, 0); br('h10A0, d);
    end
    check(mech[M_COS_LOG] >= 1, "COS entry with the 3C fault and Level 3");
    reset_faults();
    // ---- watchdog: hold one of A's lines still
    force dut.sec_line[0][3] = 1'b0;
    repeat (4000) @(negedge clk);
    br('h2081, d);
    if (d[3] && fline_c[0] != fclk_c) mech[M_WATCHDOG]++;
    check(d == 16'h0008 && fline_c[0] != fclk_c, $sformatf("stuck %h", d));
    release dut.sec_line[0][3];
    repeat (2200) @(negedge clk);
    br('h2081, d);
    check(d == 0, "watchdog clears");
    // ---- COS overflow in the common FPGA
    br('h20A0, d);
    while (d != 0) begin bw('h20A5, 0); br('h20A0, d); end
    for (int i = 0; i < 70; i++) begin
      status_c[i % 32] = ~status_c[i % 32];
      repeat (4) @(negedge clk);
    end
    br('h20A0, d); br('h2080, st);
    if (d == 64 && st[4]) mech[M_COS_OVERFLOW]++;
    check(d == 64 && st[4], $sformatf("overflow: count %0d status %h", d, st));
    // ---- record until the memory is full: 7 frames of 34 in 256 words
    code_a[CH_ID] = 123;
    bw('h0088, 4'b1111);                      // both aux = uncorrected Id
    repeat (300) @(negedge clk);
    bw('h0090, 1);
    @(negedge clk) rec_trigger = 1;
    repeat (4) @(negedge clk) rec_trigger = 0;
    repeat (128 * 10) @(negedge clk);
    br('h0080, st); br('h0091, d);
    check(st[10] && d == 7 * 34, $sformatf("record done %h words %0d", st, d));
    bw('h00B0, 0); bw('h00B1, 0);
    base = 0;
    for (int k = 0; k < 7 * 34; k++) begin
      int e;
      br('h00B2, d);
      e = (k % 34 == CH_ID) ? 4 * 123 * 256 / 256 : (k % 34 == CH_VD) ? 400 :
          (k % 34 >= 32) ? 4 * 123 : 0;
      if ($signed(d) == e) base++;
    end
    if (st[10] && base == 7 * 34) mech[M_RECORD_FULL]++;
    check(base == 7 * 34, $sformatf("record contents %0d good", base));
    // ---- every mechanism happened
    for (int m = 0; m < M_COUNT; m++) begin
      mech_e me;
      me = mech_e'(m);
      $display("mechanism %-16s %0d", me.name(), mech[m]);
      check(mech[m] > 0, $sformatf("mechanism %s never happened", me.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
