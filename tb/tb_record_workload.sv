// Workload test: one complete section recording into the full 4M x 16
// memory (MEM_AW at its default of 22, 34 channels per frame).
// To fit the simulation time the clock is 3 MHz and the ADC runs at 1 MHz,
// so a frame takes 48 clocks (16 us) instead of 125 us; the recorder and the
// memory are exactly as in the real unit. The ADC model holds each channel at
// a code that changes every 16 conversions, so every decimated frame is
// known here: word c of frame k is 4 x code(k, c). Both auxiliary channels
// carry the 1 us time stamp. The test checks that the record stops by itself
// after 123,361 frames (4,194,274 words, 15.42 s at the real 8 kHz), that
// every word of every frame holds the expected value, that consecutive
// frames are 16 us apart, and reads a few words back over the host bus.
// The common FPGA runs the same workload with its own sizes: 8 channels per
// frame, ADC at 1.5 MHz (32 clocks per frame), 524,288 frames filling all
// 4,194,304 words (65.5 s at 8 kHz, more than the 15.4 s asked for), every
// word checked the same way.
module tb_record_workload;
  import fd_pkg::*;
  localparam int NM = SECT_NMEAS, NC = SECT_NCH;
  localparam int FRAMES = (1 << 22) / NC;
  logic clk = 0, rst_n = 0;
  logic adc_convert, adc_valid = 0;
  logic signed [13:0] adc_data [NM];
  section_din_t din = '0;
  logic signed [15:0] supply_mv [N_SUPPLY] = SUPPLY_NOM_MV;
  logic unlock = 0, rec_trigger = 0, fault_clk;
  logic [11:0] dcct_ok = 0, dcct_en;
  logic [N_ACT-1:0] fault_line;
  logic bus_sel = 1, bus_wr = 0, bus_rd = 0;
  logic [11:0] bus_addr = 0;
  logic [15:0] bus_wdata = 0, bus_rdata;
  int checks = 0, failures = 0, nconv = 0;
  localparam int CFRAMES = (1 << 22) / COMMON_NCH;
  logic c_convert, c_valid = 0, c_fault_clk;
  logic signed [13:0] c_data [COMMON_NCH];
  logic [1:0] c_fault_line;
  logic c_wr = 0, c_rd = 0;
  logic [11:0] c_addr = 0;
  logic [15:0] c_wdata = 0, c_rdata;
  int c_nconv = 0;
  bit sect_done = 0;

  section_fpga #(.CLK_HZ(3_000_000), .ADC_HZ(1_000_000)) dut (.*);
  common_fpga #(.CLK_HZ(3_000_000), .ADC_HZ(1_500_000)) u_common (
    .clk, .rst_n, .adc_convert(c_convert), .adc_valid(c_valid), .adc_data(c_data),
    .status_in(32'h0), .unlock(1'b0), .sec_clk({2{fault_clk}}), .sec_line('{fault_line, fault_line}),
    .fault_clk(c_fault_clk), .fault_line(c_fault_line), .rec_trigger,
    .bus_sel(1'b1), .bus_addr(c_addr), .bus_wr(c_wr), .bus_rd(c_rd), .bus_wdata(c_wdata),
    .bus_rdata(c_rdata));
  always #5 clk = ~clk;

  function automatic logic signed [13:0] code(int g, int c);
    return 14'((g * 37 + c * 211) % 4001 - 2000);
  endfunction
  always @(posedge clk) begin
    adc_valid <= 1'b0;
    if (rst_n && adc_convert) begin
      for (int c = 0; c < NM; c++) adc_data[c] <= code(nconv / 16, c);
      adc_valid <= 1'b1;
      nconv++;
    end
  end
  always @(posedge clk) begin
    c_valid <= 1'b0;
    if (rst_n && c_convert) begin
      for (int c = 0; c < COMMON_NCH; c++) c_data[c] <= code(c_nconv / 16, c + 100);
      c_valid <= 1'b1;
      c_nconv++;
    end
  end
  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
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
  task automatic cw(input int a, input int d);
    @(negedge clk); c_wr = 1; c_addr = 12'(a); c_wdata = 16'(d);
    @(negedge clk); c_wr = 0;
  endtask
  task automatic cr(input int a, output logic [15:0] d);
    @(negedge clk); c_rd = 1; c_addr = 12'(a);
    @(negedge clk); c_rd = 0; d = c_rdata;
    @(negedge clk);
  endtask
  // common FPGA
  initial begin
    logic [15:0] d, d2;
    int g0, bad;
    for (int c = 0; c < COMMON_NCH; c++) c_data[c] = '0;
    wait (rst_n);
    repeat (200) @(negedge clk);
    cw('h090, 1);
    wait (rec_trigger);
    do begin
      repeat (100_000) @(negedge clk);
      cr('h080, d);
    end while (!d[7]);
    wait (sect_done);
    cr('h091, d); cr('h092, d2);
    check({d2, d} == 32'(CFRAMES * COMMON_NCH), $sformatf("common words %0d", {d2, d}));
    g0 = -1;
    for (int g = 0; g < 1000 && g0 < 0; g++) begin
      bit ok;
      ok = 1;
      for (int c = 0; c < COMMON_NCH; c++)
        if ($signed(u_common.u_mem.mem[c]) != 16'(4 * int'(code(g, c + 100)))) ok = 0;
      if (ok) g0 = g;
    end
    check(g0 >= 0, "common first frame found");
    bad = 0;
    for (int k = 0; k < CFRAMES; k++)
      for (int c = 0; c < COMMON_NCH; c++)
        if ($signed(u_common.u_mem.mem[k * COMMON_NCH + c]) != 16'(4 * int'(code(g0 + k, c + 100)))) bad++;
    check(bad == 0, $sformatf("common: %0d wrong samples", bad));
    checks += CFRAMES;                      // one check per frame above
    cw('h0B0, (CFRAMES - 1) * COMMON_NCH); cw('h0B1, ((CFRAMES - 1) * COMMON_NCH) >> 16);
    for (int c = 0; c < COMMON_NCH; c++) begin
      cr('h0B2, d);
      check($signed(d) == 16'(4 * int'(code(g0 + CFRAMES - 1, c + 100))), "common bus readback of last frame");
    end
    $display("common record: %0d frames, %0d words, %0.2f s at 8 kHz", CFRAMES, CFRAMES * COMMON_NCH, CFRAMES / 8000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // section FPGA
  initial begin
    logic [15:0] d, d2;
    int g0, bad, stamp_bad;
    for (int c = 0; c < NM; c++) adc_data[c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (200) @(negedge clk);
    bw('h088, 'b1010);                       // both aux channels: time stamp
    bw('h090, 1);
    @(negedge clk) rec_trigger = 1;
    repeat (4) @(negedge clk) rec_trigger = 0;
    // wait for the record to finish
    do begin
      repeat (100_000) @(negedge clk);
      br('h080, d);
    end while (!d[10]);
    br('h091, d); br('h092, d2);
    check({d2, d} == 32'(FRAMES * NC), $sformatf("words %0d exp %0d", {d2, d}, FRAMES * NC));
    check(FRAMES == 123361, "frame count");
    // group (of 16 conversions) that produced the first recorded frame
    g0 = -1;
    for (int g = 0; g < 1000 && g0 < 0; g++) begin
      bit ok;
      ok = 1;
      for (int c = 0; c < NM; c++)
        if ($signed(dut.u_mem.mem[c]) != 16'(4 * int'(code(g, c)))) ok = 0;
      if (ok) g0 = g;
    end
    check(g0 >= 0, "first frame found");
    bad = 0; stamp_bad = 0;
    for (int k = 0; k < FRAMES; k++) begin
      for (int c = 0; c < NM; c++)
        if ($signed(dut.u_mem.mem[k * NC + c]) != 16'(4 * int'(code(g0 + k, c)))) bad++;
      if (dut.u_mem.mem[k * NC + 32] != dut.u_mem.mem[k * NC + 33]) stamp_bad++;
      if (k > 0 && 16'(dut.u_mem.mem[k * NC + 32] - dut.u_mem.mem[(k - 1) * NC + 32]) != 16'd16) stamp_bad++;
    end
    check(bad == 0, $sformatf("%0d wrong samples", bad));
    check(stamp_bad == 0, $sformatf("%0d wrong frame spacings", stamp_bad));
    checks += FRAMES;                       // one check per frame above
    // last frame over the bus
    bw('h0B0, (FRAMES - 1) * NC); bw('h0B1, ((FRAMES - 1) * NC) >> 16);
    for (int c = 0; c < 4; c++) begin
      br('h0B2, d);
      check($signed(d) == 16'(4 * int'(code(g0 + FRAMES - 1, c))), "bus readback of last frame");
    end
    $display("section record: %0d frames, %0d words, %0.2f s at 8 kHz", FRAMES, FRAMES * NC, FRAMES / 8000.0);
    sect_done = 1;
  end
endmodule
