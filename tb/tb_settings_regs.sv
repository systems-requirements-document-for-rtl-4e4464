// Testbench for settings_regs (default size: 32 channels, 11 trip levels).
// Checks: writes are ignored while locked; trip writes are clamped to their
// fixed bounds; a check pass with the wrong CRC sets crc_error and one with
// the CRC computed here clears it; a corrupted word is caught by the next
// pass; a pass takes 2*NCH + NTRIP + 1 clocks.
module tb_settings_regs;
  import fd_pkg::*;
  localparam int NCH = 32, NT = N_TRIP, NW = 2*NCH + NT;
  logic clk = 0, rst_n = 0, unlock = 0, wr_en = 0, check_tick = 0;
  logic [7:0] wr_addr = 0, rd_addr = 0;
  logic [15:0] wr_data = 0, rd_data;
  logic signed [15:0] gain [NCH], offset [NCH], trip [NT];
  logic crc_error, check_done;
  logic [15:0] model [NW];
  int checks = 0, failures = 0;
  settings_regs #(.NCH(NCH), .NTRIP(NT)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic wr(input int a, input logic [15:0] d);
    @(negedge clk); wr_en = 1; wr_addr = 8'(a); wr_data = d;
    @(negedge clk); wr_en = 0;
  endtask
  // bit-serial CRC-16-CCITT written independently of the design
  function automatic logic [15:0] crc_all();
    logic [15:0] c;
    logic fb;
    c = 16'hFFFF;
    for (int w = 0; w < NW; w++)
      for (int b = 15; b >= 0; b--) begin
        fb = c[15] ^ model[w][b];
        c  = {c[14:0], 1'b0};
        if (fb) c = c ^ 16'h1021;
      end
    return c;
  endfunction
  task automatic run_check(output int cycles);
    @(negedge clk); check_tick = 1;
    @(negedge clk); check_tick = 0;
    cycles = 1;
    while (!check_done) begin @(negedge clk); cycles++; end
  endtask
  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // reset values
    for (int c = 0; c < NCH; c++) begin model[c] = 16'd256; model[NCH+c] = 0; end
    for (int t = 0; t < NT; t++) model[2*NCH+t] = TRIP_MAX[t];
    @(negedge clk);
    rd_addr = 8'(2*NCH + 3); #1;
    check(rd_data == 16'd27500, "reset value of 1B trip");
    // locked write ignored
    wr(0, 16'd999);
    check(gain[0] == 16'sd256, "locked write ignored");
    unlock = 1;
    for (int c = 0; c < NCH; c++) begin
      model[c] = 16'($urandom_range(100, 2000)); wr(c, model[c]);
      model[NCH+c] = 16'($urandom_range(0, 400)) - 16'd200; wr(NCH+c, model[NCH+c]);
    end
    for (int t = 0; t < NT; t++) begin
      int v;
      v = $urandom_range(0, 30000) - 1000;
      wr(2*NCH+t, 16'(v));
      model[2*NCH+t] = (v < TRIP_MIN[t]) ? TRIP_MIN[t] : (v > TRIP_MAX[t]) ? TRIP_MAX[t] : 16'(v);
    end
    // explicit clamp cases
    wr(2*NCH+3, 16'd100);   model[2*NCH+3] = 16'd2500;
    check(trip[3] == 16'sd2500, "1B clamped up to 2500");
    wr(2*NCH+0, 16'd9000);  model[2*NCH+0] = 16'd3380;
    check(trip[0] == 16'sd3380, "0A clamped down to 3380");
    for (int c = 0; c < NCH; c++) begin
      check(gain[c] == model[c], "gain readback");
      check(offset[c] == model[NCH+c], "offset readback");
    end
    for (int t = 0; t < NT; t++) check(trip[t] == model[2*NCH+t], "trip value");
    for (int a = 0; a < NW; a++) begin
      rd_addr = 8'(a); #1; check(rd_data == model[a], "bus readback");
    end
    // wrong CRC
    wr(NW, crc_all() ^ 16'h0001);
    run_check(cyc);
    check(crc_error, "wrong CRC detected");
    check(cyc == NW + 2, $sformatf("pass length %0d", cyc));
    // right CRC
    wr(NW, crc_all());
    run_check(cyc);
    check(!crc_error, "correct CRC accepted");
    // locked writes still ignored, CRC still good
    unlock = 0;
    wr(5, 16'h1234);
    run_check(cyc);
    check(!crc_error && gain[5] == model[5], "locked write changes nothing");
    // corrupt one word behind the CRC's back (unlocked write, CRC not updated)
    unlock = 1;
    wr(NCH + 7, model[NCH+7] ^ 16'h0040);
    run_check(cyc);
    check(crc_error, "corruption detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
