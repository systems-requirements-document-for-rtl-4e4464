// Testbench for section_fault_logic. Every row of the fault table is
// provoked on its own from a healthy baseline and the live fault word must
// equal the bits worked out here (some conditions set two rows by design,
// e.g. a PT failure is also a loss of AC without advance trip). Thresholds
// are tested at and just above the trip level. Then: Level 1-3 faults stay
// latched after their cause is gone until fault_reset; the actions follow
// the latched levels; the loss-of-water (1D), overtime (1G) and
// failure-to-suppress (2A) timers fire only after their set time.
// tick_us is every clock, tick_ms every 4 clocks, half cycle = 20 us.
module tb_section_fault_logic;
  import fd_pkg::*;
  localparam int NCH = 32, HALF = 20;
  logic clk = 0, rst_n = 0, tick_us = 1, tick_ms = 0, fd_not_ready = 0, fault_reset = 0;
  logic signed [15:0] meas [NCH], trip [N_TRIP];
  section_din_t din;
  logic signed [15:0] supply_mv [N_SUPPLY];
  faults_t faults, latched;
  logic alarm0;
  logic [N_ACT-1:0] actions;
  int checks = 0, failures = 0, cyc = 0;
  section_fault_logic #(.NCH(NCH), .HALF_CYCLE_US(HALF)) dut (.*);
  always #5 clk = ~clk;
  always @(negedge clk) begin cyc++; tick_ms <= (cyc % 4 == 0); end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic baseline();
    for (int c = 0; c < NCH; c++) meas[c] = 0;
    meas[CH_VD] = 16'sd100;
    din = '0;
    din.permissive = 1; din.cmd_link_ok = 1; din.fg_ready = 1; din.flow_ok = 1;
    din.mgd_ok = 1; din.supply_ok = 4'hF;
    supply_mv = SUPPLY_NOM_MV;
    fd_not_ready = 0;
  endtask
  task automatic do_reset();
    @(negedge clk) fault_reset = 1;
    @(negedge clk) fault_reset = 0;
  endtask
  function automatic logic [N_ACT-1:0] exp_actions(logic [23:0] lat);
    logic l1, l2, l3;
    l1 = |(lat & L1_MASK); l2 = |(lat & L2_MASK); l3 = |(lat & L3_MASK);
    return {l3, l2, l1 | l3, l1 | l3, l3, l1};
  endfunction
  // Apply (already set up by caller), then check live, latched, actions,
  // then return to baseline and check the latch and its reset.
  task automatic expect_bits(input logic [23:0] exp, input string name);
    logic [23:0] lat_exp;
    repeat (3) @(negedge clk);
    check(faults == exp, $sformatf("%s: faults %h exp %h", name, faults, exp));
    lat_exp = exp & ~L0_MASK;
    check(latched == lat_exp, $sformatf("%s: latched %h exp %h", name, latched, lat_exp));
    check(actions == exp_actions(lat_exp), $sformatf("%s: actions %b", name, actions));
    check(alarm0 == |(exp & L0_MASK), $sformatf("%s: alarm0", name));
    baseline();
    repeat (3) @(negedge clk);
    check(faults == 0, $sformatf("%s: cause removed, faults %h", name, faults));
    check(latched == lat_exp, $sformatf("%s: latch held", name));
    do_reset();
    @(negedge clk);
    check(latched == 0 && actions == 0, $sformatf("%s: reset clears", name));
  endtask
  function automatic logic [23:0] b(input int pos);
    return 24'(1) << pos;
  endfunction
  initial begin
    faults_t fx;
    int t0;
    trip[T_0A_IMBAL] = 1000; trip[T_0B_BPIMBAL] = 500; trip[T_1A_MODOC] = 5000;
    trip[T_1B_SECTOC] = 15000; trip[T_1C_BPBLOCK] = 900; trip[T_1D_WATER] = 20;
    trip[T_1G_OVERT] = 30; trip[T_2A_SUPPR] = 1000; trip[T_3A_BPOC] = 5000; trip[T_3B_NEGV] = 350;
    trip[T_1K_TOL] = 10;
    baseline();
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(faults == 0 && latched == 0, "healthy baseline");
    // bit positions in faults_t
    // 0A..0G = 0..6, 1A..1K = 7..17, 1O = 18, 1P = 19, 2A = 20, 3A..3C = 21..23
    meas[0] = 400; meas[1] = 300; meas[2] = 300;              expect_bits(0, "0A at threshold");
    meas[0] = 600; meas[1] = 600; meas[2] = 600;              expect_bits(b(0), "0A");
    meas[CH_DCCT0+3] = 500;                                   expect_bits(0, "0B at threshold");
    meas[CH_DCCT0+3] = 800;                                   expect_bits(b(1), "0B");
    meas[CH_VD] = -10;                                        expect_bits(b(2), "0C");
    meas[CH_VD] = -10; din.bypass_block = 1;                  expect_bits(0, "0C blocked");
    for (int k = 0; k < 12; k++) meas[CH_DCCT0+k] = 600;
    meas[CH_VD] = -10;                                        expect_bits(0, "0C all legs conducting");
    din.fg_ready = 0;                                         expect_bits(b(3), "0D");
    din.mgd_ok = 0;                                           expect_bits(b(4), "0E");
    din.flow_ok = 0;                                          expect_bits(b(5), "0F");
    din.pt_fail = 2'b01;                                      expect_bits(b(6) | b(14), "0G+1H");
    din.pt_fail = 2'b10; din.cb_adv_trip = 1;                 expect_bits(b(6) | b(11), "0G+1E");
    meas[3] = 5000; meas[4] = -2500; meas[5] = -2500;         expect_bits(0, "1A at threshold");
    meas[3] = -5001; meas[4] = 2500; meas[5] = 2501;          expect_bits(b(7), "1A");
    meas[CH_ID] = 15001;                                      expect_bits(b(8), "1B");
    meas[CH_DCCT0+0] = 901; meas[CH_DCCT0+1] = 600;           expect_bits(b(1) | b(9), "0B+1C");
    meas[CH_DCCT0+0] = 901; meas[CH_DCCT0+1] = 600; din.bypass_cmd = 1; expect_bits(b(1), "1C with bypass cmd");
    din.ovs_fuse = 1;                                         expect_bits(b(12), "1F");
    din.ext_l1 = 1;                                           expect_bits(b(15), "1I");
    fd_not_ready = 1;                                         expect_bits(b(16), "1J");
    fd_not_ready = 1; din.permissive = 0;                     expect_bits(0, "1J without permissive");
    din.supply_ok = 4'b1011;                                  expect_bits(b(17), "1K");
    supply_mv[0] = 26400;                                     expect_bits(0, "1K at +10 %");
    supply_mv[0] = 26401;                                     expect_bits(b(17), "1K above +10 %");
    supply_mv[2] = -13500;                                    expect_bits(0, "1K -15 V at -10 %");
    supply_mv[2] = -13499;                                    expect_bits(b(17), "1K -15 V below -10 %");
    supply_mv[3] = 4499;                                      expect_bits(b(17), "1K +5 V low");
    trip[T_1K_TOL] = 5;
    supply_mv[1] = 15750;                                     expect_bits(0, "1K at +5 %");
    supply_mv[1] = 15751;                                     expect_bits(b(17), "1K above +5 %");
    trip[T_1K_TOL] = 10;
    din.cmd_link_ok = 0;                                      expect_bits(b(18), "1O");
    din.permissive = 0; din.convert = 1;                      expect_bits(b(19), "1P");
    din.bypass_cmd = 1;
    for (int k = 0; k < 12; k++) meas[CH_DCCT0+k] = 5001;     expect_bits(b(21), "3A");
    meas[CH_VD] = -351;                                       expect_bits(b(2) | b(22), "0C+3B");
    meas[CH_VD] = -350;                                       expect_bits(b(2), "3B at threshold");
    meas[CH_VD] = -400; meas[CH_DCCT0+5] = 60;                expect_bits(b(2), "3B with a conducting leg");
    meas[CH_VD] = -400; din.bypass_block = 1;                 expect_bits(0, "3B blocked");
    din.ext_l3 = 1;                                           expect_bits(b(23), "3C");

    // 1D: loss of water for more than 20 ms with permissive
    din.flow_ok = 0;
    repeat (4*20 - 4) @(negedge clk);
    check(!faults.f1d_water_perm && faults.f0f_water, "1D not before 20 ms");
    repeat (12) @(negedge clk);
    check(faults.f1d_water_perm, "1D after 20 ms");
    baseline(); do_reset(); @(negedge clk);
    // 1G: section current above the on-level for more than 30 ms
    meas[CH_ID] = 1000;
    repeat (4*30 - 4) @(negedge clk);
    check(!faults.f1g_overtime, "1G not before 30 ms");
    repeat (12) @(negedge clk);
    check(faults.f1g_overtime, "1G after 30 ms");
    baseline(); do_reset(); @(negedge clk);
    check(latched == 0, "clean before 2A");
    // 2A: module current still flowing half a cycle after suppression
    meas[0] = 1500; meas[1] = -1500;
    din.ext_l1 = 1;                       // Level 1: suppression starts
    @(negedge clk); @(negedge clk);
    din.ext_l1 = 0;
    check(actions[A_SUPPRESS], "suppress on Level 1");
    repeat (HALF - 4) @(negedge clk);
    check(!faults.f2a_suppr_fail, "2A not before half cycle");
    repeat (6) @(negedge clk);
    check(faults.f2a_suppr_fail && latched.f2a_suppr_fail, "2A after half cycle");
    check(actions[A_OPEN_CB] && !actions[A_GND_SW], "Level 2 opens breaker only");
    meas[0] = 0; meas[1] = 0;
    do_reset(); @(negedge clk);
    check(latched == 0 && actions == 0, "all clear at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
