// Full-size run of fault_detector_top with every parameter at its default
// (50 MHz clock, 128 kHz ADC, 4M-word memories): one complete protection
// operation on section A. The host loads a configuration with its CRC; after
// the 1 ms check the unit is ready; the ADC convert strobe is checked to come
// every 390 clocks and decimated frames every 16 conversions; a module
// overcurrent trips Level 1 within two frames, the fault lines show it, the
// common FPGA decodes it and the change is logged with a time stamp; a
// triggered recording of the fault is read back from the memory; a reset
// clears the fault.
module tb_full_size_top;
  import fd_pkg::*;
  localparam int NM = SECT_NMEAS, NWS = 2*NM + N_TRIP;
  logic clk = 0, rst_n = 0;
  logic adc_convert_a, adc_convert_b, adc_convert_c;
  logic adc_valid_a = 0, adc_valid_b = 0, adc_valid_c = 0;
  logic signed [13:0] adc_a [NM], adc_b [NM], adc_c [COMMON_NCH];
  logic signed [13:0] code_a [NM];
  section_din_t din_a, din_b;
  logic signed [15:0] supply_mv_a [N_SUPPLY] = SUPPLY_NOM_MV, supply_mv_b [N_SUPPLY] = SUPPLY_NOM_MV;
  logic [11:0] dcct_ok_a = 0, dcct_ok_b = 0, dcct_en_a, dcct_en_b;
  logic fclk_a, fclk_b, fclk_c;
  logic [N_ACT-1:0] fline_a, fline_b;
  logic [1:0] fline_c;
  logic [31:0] status_c = 0;
  logic unlock = 1, rec_trigger = 0;
  logic [13:0] bus_addr = 0;
  logic bus_wr = 0, bus_rd = 0;
  logic [15:0] bus_wdata = 0, bus_rdata;
  logic [15:0] cfg [NWS+1];
  int checks = 0, failures = 0, ncyc = 0, last_conv = 0, conv_gap = 0, nconv = 0;

  fault_detector_top dut (.*);
  always #10 clk = ~clk;            // 50 MHz
  always @(posedge clk) begin
    ncyc++;
    adc_valid_a <= adc_convert_a; adc_valid_b <= adc_convert_b; adc_valid_c <= adc_convert_c;
    if (adc_convert_a) begin
      adc_a <= code_a;
      if (nconv > 0) conv_gap = ncyc - last_conv;
      last_conv = ncyc; nconv++;
    end
    if (adc_convert_b) for (int c = 0; c < NM; c++) adc_b[c] <= '0;
    if (adc_convert_c) for (int c = 0; c < COMMON_NCH; c++) adc_c[c] <= '0;
  end
  initial begin
    repeat (1_500_000) @(posedge clk);
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
  function automatic logic [15:0] crc_cfg();
    logic [15:0] c;
    c = 16'hFFFF;
    for (int k = 0; k < NWS; k++)
      for (int i = 15; i >= 0; i--)
        c = (c[15] ^ cfg[k][i]) ? ({c[14:0], 1'b0} ^ 16'h1021) : {c[14:0], 1'b0};
    return c;
  endfunction
  initial begin
    logic [15:0] d, st;
    logic [63:0] head;
    int t_fault, t_line, found, good, ncos;
    for (int c = 0; c < NM; c++) code_a[c] = 0;
    code_a[CH_VD] = 100;
    din_a = '0; din_a.cmd_link_ok = 1; din_a.fg_ready = 1; din_a.flow_ok = 1; din_a.mgd_ok = 1;
    din_a.supply_ok = 4'hF;
    din_b = din_a;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);             // key switch synchronised
    for (int c = 0; c < NM; c++) begin cfg[c] = 512; cfg[NM+c] = 16'(c); end   // gain 2.0
    cfg[2*NM+0] = 1000; cfg[2*NM+1] = 500;  cfg[2*NM+2] = 2000; cfg[2*NM+3] = 15000;
    cfg[2*NM+4] = 900;  cfg[2*NM+5] = 50;   cfg[2*NM+6] = 10000; cfg[2*NM+7] = 1000;
    cfg[2*NM+8] = 5000; cfg[2*NM+9] = 350; cfg[2*NM+10] = 10;
    cfg[NWS] = crc_cfg();
    for (int a = 0; a <= NWS; a++) bw(a, cfg[a]);
    repeat (2 * 50_000 + 500) @(negedge clk);
    br('h0080, st);
    check(!st[1] && !st[2], $sformatf("section A ready, status %h", st));
    din_a.permissive = 1;
    din_a.reset = 1; repeat (5) @(negedge clk); din_a.reset = 0; repeat (5) @(negedge clk);
    check(fline_a == {N_ACT{fclk_a}}, "healthy lines");
    check(conv_gap == 390, $sformatf("ADC convert every %0d clocks", conv_gap));
    // overcurrent on module 2 phase C: 4*700 - 8, times 2 = 5584 A > 2000 A
    bw('h0088, 4'b1010);                     // aux: time stamp on both
    repeat (20_000) @(negedge clk);
    bw('h0090, 1);
    code_a[8] = 700; code_a[6] = -350; code_a[7] = -350;
    t_fault = ncyc;
    @(negedge clk) rec_trigger = 1;
    repeat (4) @(negedge clk) rec_trigger = 0;
    while (fline_a[A_L1] == fclk_a && ncyc - t_fault < 40_000) @(negedge clk);
    t_line = ncyc - t_fault;
    check(t_line <= 2 * 16 * 390 + 20, $sformatf("Level 1 after %0d clocks (two frames at most)", t_line));
    check(fline_a[A_SUPPRESS] != fclk_a && fline_a[A_FIRE_BP] != fclk_a, "suppress and fire bypass");
    repeat (20) @(negedge clk);
    br('h2083, d);
    check(d[A_L1], "common FPGA decodes Level 1");
    br('h0081, d);
    check(d[7], "1A latched");
    br('h00A0, d);
    found = 0; ncos = int'(d);
    while (d != 0) begin
      br('h00A1, head[15:0]); br('h00A2, head[31:16]); br('h00A3, head[47:32]); br('h00A4, head[63:48]);
      if (head[24+7] && head[24+24] && head[23:0] > 24'd2000) found++;
      bw('h00A5, 0); br('h00A0, d);
    end
    check(found >= 1, $sformatf("Level 1 logged (%0d entries)", ncos));
    repeat (3 * 16 * 390) @(negedge clk);
    bw('h0090, 2);
    repeat (100) @(negedge clk);
    br('h0091, d);
    check(d >= 3 * 34 && d % 34 == 0, $sformatf("recorded %0d words", d));
    bw('h00B0, 34); bw('h00B1, 0);              // second frame
    good = 0;
    for (int k = 0; k < 32; k++) begin
      int e;
      br('h00B2, d);
      e = 2 * (4 * int'(code_a[k]) - k);
      if ($signed(d) == e) good++;
      else $display("frame word %0d: %0d exp %0d", k, $signed(d), e);
    end
    check(good == 32, "recorded frame contents");
    br('h00B2, d);                              // aux 0 of the second frame
    bw('h00B0, 2 * 34 + 32);
    br('h00B2, st);                             // aux 0 of the third frame
    check(st - d == 16'd125 || st - d == 16'd124, $sformatf("frames %0d us apart (8 kHz)", st - d));
    for (int c = 6; c < 9; c++) code_a[c] = 0;
    repeat (3 * 16 * 390) @(negedge clk);
    din_a.reset = 1; repeat (5) @(negedge clk); din_a.reset = 0; repeat (5) @(negedge clk);
    br('h0081, d);
    check(d == 0 && fline_a == {N_ACT{fclk_a}}, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
