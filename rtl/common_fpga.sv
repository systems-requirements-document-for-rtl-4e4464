// FPGA of the common section.
//
// Handles the eight analog signals shared by both rectifier sections (alpha
// and alpha limit of sections A and B, two primary voltages, two primary
// ACCTs) with the same chain as a section: ADC pacing, 16x decimation,
// gain/offset correction, triggered recording into a 4M x 16 memory. It also
// watches the toggled fault lines of both sections: one toggle_watchdog per
// section decodes every line (line XOR clock) and flags lines that stopped
// toggling. Its own two toggled fault lines carry [0] a watchdog fault on
// either section and [1] a Level 1 or Level 3 fault decoded from either
// section. A 40-bit status word {crc_error, wd_fault, B L3, B L1, A L3, A L1,
// B stuck, A stuck, status_in[31:0]} is logged by cos_fifo with a 1 us stamp.
//
// Host bus (word addresses, bus_rdata valid one clock after bus_rd):
//   000-011  settings: gain[8], offset[8], watchdog timeout in us
//            (1100-2500), CRC (writes need unlock)
//   080 R    status {rec_done, rec_recording, rec_armed, fifo_ovf, wd_fault,
//                    fd_not_ready, crc_error, unlock}
//   081/082 R stuck bits of section A/B (bit 6 is the clock line)
//   083 R    decoded fault lines {B[5:0], A[5:0]}
//   085 W    bit1 clear FIFO overflow
//   090 W    bit0 arm recorder, bit1 stop; 091/092 R words recorded
//   0A0-0A5  change-of-state FIFO as in the section FPGA
//   0B0-0B2  memory read port as in the section FPGA
//   0C0+c R  live corrected value of channel c (0-7)
// The channel list, the 16x decimation, the memory size and the use of the
// fault lines as watchdog inputs follow the requirements; placing the
// watchdogs here, the meaning of the common fault lines, the timeout range
// and the register map are this design's choice.
module common_fpga
  import fd_pkg::*;
#(
  parameter int CLK_HZ     = 50_000_000,
  parameter int ADC_HZ     = 128_000,
  parameter int OSR        = 16,
  parameter int MEM_AW     = 22,
  parameter int FIFO_DEPTH = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               adc_convert,
  input  logic               adc_valid,
  input  logic signed [13:0] adc_data [COMMON_NCH],
  input  logic [31:0]        status_in,
  input  logic               unlock,
  input  logic [1:0]         sec_clk,               // fault clocks of A, B
  input  logic [N_ACT-1:0]   sec_line [2],          // fault lines of A, B
  output logic               fault_clk,
  output logic [1:0]         fault_line,
  input  logic               rec_trigger,
  input  logic               bus_sel,
  input  logic [11:0]        bus_addr,
  input  logic               bus_wr,
  input  logic               bus_rd,
  input  logic [15:0]        bus_wdata,
  output logic [15:0]        bus_rdata
);
  localparam int NC = COMMON_NCH;
  localparam logic signed [15:0] WD_LO [1] = '{16'sd1100};
  localparam logic signed [15:0] WD_HI [1] = '{16'sd2500};

  // ---------------- time base
  logic tick_us, tick_ms;
  logic [23:0] stamp;
  rate_gen #(.DIV(CLK_HZ / 1_000_000)) u_us  (.clk, .rst_n, .en(1'b1),    .tick(tick_us));
  rate_gen #(.DIV(1000))               u_ms  (.clk, .rst_n, .en(tick_us), .tick(tick_ms));
  rate_gen #(.DIV(CLK_HZ / ADC_HZ))    u_adc (.clk, .rst_n, .en(1'b1),    .tick(adc_convert));
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       stamp <= '0;
    else if (tick_us) stamp <= stamp + 1'b1;

  logic [31:0] st_s1, st_s;
  logic        unlock_s1, unlock_s, trig_s1, trig_s2, trig_s3;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_s1 <= '0; st_s <= '0; unlock_s1 <= 1'b0; unlock_s <= 1'b0;
      trig_s1 <= 1'b0; trig_s2 <= 1'b0; trig_s3 <= 1'b0;
    end else begin
      st_s1 <= status_in; st_s <= st_s1;
      unlock_s1 <= unlock; unlock_s <= unlock_s1;
      trig_s1 <= rec_trigger; trig_s2 <= trig_s1; trig_s3 <= trig_s2;
    end
  end

  // ---------------- host writes
  logic wr, rd;
  assign wr = bus_sel && bus_wr;
  assign rd = bus_sel && bus_rd;
  logic              host_clr_ovf, rec_arm, rec_stop, fifo_pop;
  logic [MEM_AW-1:0] maddr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      maddr <= '0; host_clr_ovf <= 1'b0; rec_arm <= 1'b0; rec_stop <= 1'b0; fifo_pop <= 1'b0;
    end else begin
      host_clr_ovf <= 1'b0; rec_arm <= 1'b0; rec_stop <= 1'b0; fifo_pop <= 1'b0;
      if (wr) begin
        case (bus_addr)
          12'h085: host_clr_ovf <= bus_wdata[1];
          12'h090: begin rec_arm <= bus_wdata[0]; rec_stop <= bus_wdata[1]; end
          12'h0A5: fifo_pop <= 1'b1;
          12'h0B0: maddr <= MEM_AW'({maddr >> 16, bus_wdata});
          12'h0B1: maddr <= MEM_AW'({bus_wdata, maddr[15:0]});
          default: ;
        endcase
      end else if (rd && bus_addr == 12'h0B2) begin
        maddr <= maddr + 1'b1;
      end
    end
  end

  // ---------------- settings
  logic signed [15:0] gain [NC], offset [NC], wd_timeout [1];
  logic [15:0] set_rdata;
  logic        crc_error, check_done, checked, fd_not_ready;
  settings_regs #(.NCH(NC), .NTRIP(1), .TRIP_LO(WD_LO), .TRIP_HI(WD_HI)) u_set (
    .clk, .rst_n, .unlock(unlock_s),
    .wr_en(wr && bus_addr < 12'h080), .wr_addr(bus_addr[7:0]), .wr_data(bus_wdata),
    .rd_addr(bus_addr[7:0]), .rd_data(set_rdata), .check_tick(tick_ms),
    .gain, .offset, .trip(wd_timeout), .crc_error, .check_done);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)          checked <= 1'b0;
    else if (check_done) checked <= 1'b1;
  assign fd_not_ready = !checked || crc_error;

  // ---------------- signal chain
  logic               dec_valid, cor_valid;
  logic signed [15:0] dec [NC], cor [NC];
  decimator #(.NCH(NC), .OSR(OSR), .IN_W(14), .OUT_W(16)) u_dec (
    .clk, .rst_n, .in_valid(adc_valid), .in_data(adc_data), .out_valid(dec_valid), .out_data(dec));
  gain_offset #(.NCH(NC), .W(16), .FRAC(8)) u_cor (
    .clk, .rst_n, .in_valid(dec_valid), .in_data(dec), .gain, .offset,
    .out_valid(cor_valid), .out_data(cor));

  // ---------------- watchdogs on the section fault lines
  logic [N_ACT-1:0] dec_a, dec_b;
  logic [N_ACT:0]   stuck_a, stuck_b;
  logic             wd_a, wd_b, wd_fault, sect_fault;
  toggle_watchdog #(.N(N_ACT)) u_wd_a (
    .clk, .rst_n, .tick_us, .timeout_us(wd_timeout[0]), .clk_line(sec_clk[0]), .line(sec_line[0]),
    .decoded(dec_a), .stuck(stuck_a), .wd_fault(wd_a));
  toggle_watchdog #(.N(N_ACT)) u_wd_b (
    .clk, .rst_n, .tick_us, .timeout_us(wd_timeout[0]), .clk_line(sec_clk[1]), .line(sec_line[1]),
    .decoded(dec_b), .stuck(stuck_b), .wd_fault(wd_b));
  assign wd_fault   = wd_a || wd_b;
  assign sect_fault = dec_a[A_L1] || dec_a[A_L3] || dec_b[A_L1] || dec_b[A_L3];

  fault_output_driver #(.N(2)) u_fout (
    .clk, .rst_n, .tick_ms, .fault({sect_fault, wd_fault}), .clk_line(fault_clk), .line(fault_line));

  // ---------------- change-of-state store
  logic [39:0] cos_status;
  logic [63:0] cos_head;
  logic [$clog2(FIFO_DEPTH):0] cos_count;
  logic        cos_ovf;
  assign cos_status = {crc_error, wd_fault, dec_b[A_L3], dec_b[A_L1], dec_a[A_L3], dec_a[A_L1],
                       wd_b, wd_a, st_s};
  cos_fifo #(.DEPTH(FIFO_DEPTH), .STATUS_W(40), .STAMP_W(24)) u_cos (
    .clk, .rst_n, .status(cos_status), .stamp, .pop(fifo_pop), .clear_ovf(host_clr_ovf),
    .head(cos_head), .count(cos_count), .overflow(cos_ovf));

  // ---------------- recorder
  logic [15:0]       frame [NC];
  logic              mem_we, rec_armed, rec_recording, rec_done;
  logic [MEM_AW-1:0] mem_waddr;
  logic [15:0]       mem_wdata, mem_rdata;
  logic [MEM_AW:0]   rec_words;
  always_comb for (int c = 0; c < NC; c++) frame[c] = cor[c];
  waveform_recorder #(.NCH(NC), .AW(MEM_AW), .DW(16)) u_rec (
    .clk, .rst_n, .arm(rec_arm), .stop(rec_stop), .trigger(trig_s2 && !trig_s3),
    .in_valid(cor_valid), .in_data(frame), .mem_we, .mem_addr(mem_waddr), .mem_wdata,
    .armed(rec_armed), .recording(rec_recording), .done(rec_done), .words(rec_words));
  sample_memory #(.AW(MEM_AW), .DW(16)) u_mem (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata), .raddr(maddr), .rdata(mem_rdata));

  // ---------------- host reads
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bus_rdata <= '0;
    else if (rd) begin
      if (bus_addr < 12'h080) bus_rdata <= set_rdata;
      else if (bus_addr >= 12'h0C0 && bus_addr < 12'h0C0 + 12'(NC)) bus_rdata <= frame[int'(bus_addr) - 'hC0];
      else begin
        case (bus_addr)
          12'h080: bus_rdata <= {8'b0, rec_done, rec_recording, rec_armed, cos_ovf, wd_fault,
                                 fd_not_ready, crc_error, unlock_s};
          12'h081: bus_rdata <= 16'(stuck_a);
          12'h082: bus_rdata <= 16'(stuck_b);
          12'h083: bus_rdata <= {4'b0, dec_b, dec_a};
          12'h091: bus_rdata <= rec_words[15:0];
          12'h092: bus_rdata <= 16'(rec_words >> 16);
          12'h0A0: bus_rdata <= 16'(cos_count);
          12'h0A1: bus_rdata <= cos_head[15:0];
          12'h0A2: bus_rdata <= cos_head[31:16];
          12'h0A3: bus_rdata <= cos_head[47:32];
          12'h0A4: bus_rdata <= cos_head[63:48];
          12'h0B2: bus_rdata <= mem_rdata;
          default: bus_rdata <= 16'h0000;
        endcase
      end
    end
  end
endmodule
