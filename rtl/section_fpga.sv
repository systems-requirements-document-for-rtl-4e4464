// FPGA of one rectifier section.
//
// Signal chain: a rate generator starts the 32 simultaneously sampled ADC
// channels at ADC_HZ (128 kHz); the decimator averages 16 samples into an
// 8 kHz stream; gain_offset converts it to engineering units with the gains
// and offsets of settings_regs; section_fault_logic evaluates the fault table
// and its latched levels drive six toggled fault lines (Level 1, Level 3,
// suppress, fire bypass, open AC breaker, close DC ground switch) through
// fault_output_driver. A 40-bit status word (24 live fault bits, the two
// internal fault levels and 14 discrete inputs) goes to cos_fifo with a 1 us
// time stamp; the 32 corrected channels plus two auxiliary channels go to
// waveform_recorder and its 4M x 16 sample_memory. supply_mv carries the
// local supply voltages in mV from the board's monitor converter; they are
// registered once and checked by fault 1K.
//
// Host bus (word addresses, bus_rdata valid one clock after bus_rd):
//   000-04B  settings: gain[32], offset[32], trip[11], CRC (writes need unlock)
//   080 R    status {rec_done, rec_recording, rec_armed, fifo_ovf, alarm0,
//                    L3, L2, L1, fd_not_ready, crc_error, unlock}
//   081/082 R latched faults [15:0]/[23:16]; 083/084 R live faults
//   085 W    bit0 fault reset, bit1 clear FIFO overflow
//   088 RW   aux select: bits [1:0] for aux 0, [3:2] for aux 1
//            (0 latched faults [15:0], 1 live faults [15:0], 2 time stamp,
//            3 uncorrected Id)
//   089 RW   DCCT source enables; 08A R DCCT source status
//   090 W    bit0 arm recorder, bit1 stop; 091/092 R words recorded
//   0A0 R    FIFO count; 0A1-0A4 R head word, 16 bits each, LSBs first;
//   0A5 W    pop
//   0B0/0B1 W memory read address low/high; 0B2 R memory word, then the
//            address increments (space these reads at least 2 clocks apart)
//   0C0+c R  live corrected value of channel c (0-33)
// The blocks and their rates follow the requirements. The register map, the
// synchronous host bus, the aux selections and the 2-flop input
// synchronisers are this design's choice.
module section_fpga
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
  // ADC
  output logic               adc_convert,
  input  logic               adc_valid,
  input  logic signed [13:0] adc_data [SECT_NMEAS],
  // discrete I/O
  input  section_din_t       din,
  input  logic signed [15:0] supply_mv [N_SUPPLY],
  input  logic               unlock,
  input  logic [11:0]        dcct_ok,
  output logic [11:0]        dcct_en,
  output logic               fault_clk,
  output logic [N_ACT-1:0]   fault_line,
  input  logic               rec_trigger,
  // host bus
  input  logic               bus_sel,
  input  logic [11:0]        bus_addr,
  input  logic               bus_wr,
  input  logic               bus_rd,
  input  logic [15:0]        bus_wdata,
  output logic [15:0]        bus_rdata
);
  localparam int NM = SECT_NMEAS;
  localparam int NC = SECT_NCH;

  // ---------------- time base
  logic tick_us, tick_ms;
  logic [23:0] stamp;
  rate_gen #(.DIV(CLK_HZ / 1_000_000)) u_us  (.clk, .rst_n, .en(1'b1),    .tick(tick_us));
  rate_gen #(.DIV(1000))               u_ms  (.clk, .rst_n, .en(tick_us), .tick(tick_ms));
  rate_gen #(.DIV(CLK_HZ / ADC_HZ))    u_adc (.clk, .rst_n, .en(1'b1),    .tick(adc_convert));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       stamp <= '0;
    else if (tick_us) stamp <= stamp + 1'b1;

  // ---------------- input synchronisers
  section_din_t din_s1, din_s;
  logic         unlock_s1, unlock_s, trig_s1, trig_s2, trig_s3;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      din_s1 <= '0; din_s <= '0;
      unlock_s1 <= 1'b0; unlock_s <= 1'b0;
      trig_s1 <= 1'b0; trig_s2 <= 1'b0; trig_s3 <= 1'b0;
    end else begin
      din_s1 <= din;  din_s <= din_s1;
      unlock_s1 <= unlock; unlock_s <= unlock_s1;
      trig_s1 <= rec_trigger; trig_s2 <= trig_s1; trig_s3 <= trig_s2;
    end
  end

  logic signed [15:0] supply_q [N_SUPPLY];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) supply_q <= SUPPLY_NOM_MV;
    else        supply_q <= supply_mv;

  // ---------------- host register writes
  logic wr, rd;
  assign wr = bus_sel && bus_wr;
  assign rd = bus_sel && bus_rd;

  logic [3:0]        aux_sel;
  logic              host_freset, host_clr_ovf, rec_arm, rec_stop, fifo_pop;
  logic [MEM_AW-1:0] maddr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aux_sel <= '0; dcct_en <= '0; maddr <= '0;
      host_freset <= 1'b0; host_clr_ovf <= 1'b0;
      rec_arm <= 1'b0; rec_stop <= 1'b0; fifo_pop <= 1'b0;
    end else begin
      host_freset <= 1'b0; host_clr_ovf <= 1'b0;
      rec_arm <= 1'b0; rec_stop <= 1'b0; fifo_pop <= 1'b0;
      if (wr) begin
        case (bus_addr)
          12'h085: begin host_freset <= bus_wdata[0]; host_clr_ovf <= bus_wdata[1]; end
          12'h088: aux_sel <= bus_wdata[3:0];
          12'h089: dcct_en <= bus_wdata[11:0];
          12'h090: begin rec_arm <= bus_wdata[0]; rec_stop <= bus_wdata[1]; end
          12'h0A5: fifo_pop <= 1'b1;
          12'h0B0: maddr <= MEM_AW'({maddr[MEM_AW-1:0] >> 16, bus_wdata});
          12'h0B1: maddr <= MEM_AW'({bus_wdata, maddr[15:0]});
          default: ;
        endcase
      end else if (rd && bus_addr == 12'h0B2) begin
        maddr <= maddr + 1'b1;
      end
    end
  end

  // ---------------- settings
  logic signed [15:0] gain [NM], offset [NM], trip [N_TRIP];
  logic [15:0] set_rdata;
  logic        crc_error, check_done, checked, fd_not_ready;
  settings_regs #(.NCH(NM), .NTRIP(N_TRIP)) u_set (
    .clk, .rst_n, .unlock(unlock_s),
    .wr_en(wr && bus_addr < 12'h080), .wr_addr(bus_addr[7:0]), .wr_data(bus_wdata),
    .rd_addr(bus_addr[7:0]), .rd_data(set_rdata), .check_tick(tick_ms),
    .gain, .offset, .trip, .crc_error, .check_done);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)          checked <= 1'b0;
    else if (check_done) checked <= 1'b1;
  assign fd_not_ready = !checked || crc_error;

  // ---------------- signal chain
  logic               dec_valid, cor_valid;
  logic signed [15:0] dec [NM], cor [NM];
  decimator #(.NCH(NM), .OSR(OSR), .IN_W(14), .OUT_W(16)) u_dec (
    .clk, .rst_n, .in_valid(adc_valid), .in_data(adc_data), .out_valid(dec_valid), .out_data(dec));
  gain_offset #(.NCH(NM), .W(16), .FRAC(8)) u_cor (
    .clk, .rst_n, .in_valid(dec_valid), .in_data(dec), .gain, .offset,
    .out_valid(cor_valid), .out_data(cor));

  // ---------------- fault table
  faults_t            faults, latched;
  logic               alarm0;
  logic [N_ACT-1:0]   actions;
  section_fault_logic #(.NCH(NM)) u_flt (
    .clk, .rst_n, .meas(cor), .trip, .supply_mv(supply_q), .din(din_s), .fd_not_ready, .tick_us, .tick_ms,
    .fault_reset(din_s.reset || host_freset), .faults, .latched, .alarm0, .actions);

  fault_output_driver #(.N(N_ACT)) u_fout (
    .clk, .rst_n, .tick_ms, .fault(actions), .clk_line(fault_clk), .line(fault_line));

  // ---------------- change-of-state store
  logic [39:0] cos_status;
  logic [63:0] cos_head;
  logic [$clog2(FIFO_DEPTH):0] cos_count;
  logic        cos_ovf;
  assign cos_status = {din_s.bypass_block, din_s.mgd_ok, din_s.flow_ok, din_s.fg_ready,
                       din_s.pt_fail, din_s.cb_adv_trip, din_s.bypass_cmd, din_s.convert,
                       din_s.cmd_link_ok, din_s.reset, din_s.ext_l3, din_s.ext_l1,
                       din_s.permissive, actions[A_L3], actions[A_L1], faults};
  cos_fifo #(.DEPTH(FIFO_DEPTH), .STATUS_W(40), .STAMP_W(24)) u_cos (
    .clk, .rst_n, .status(cos_status), .stamp, .pop(fifo_pop), .clear_ovf(host_clr_ovf),
    .head(cos_head), .count(cos_count), .overflow(cos_ovf));

  // ---------------- auxiliary channels and recorder
  logic [15:0] frame [NC];
  function automatic logic [15:0] aux_word(logic [1:0] sel);
    case (sel)
      2'd0:    return latched[15:0];
      2'd1:    return faults[15:0];
      2'd2:    return stamp[15:0];
      default: return dec[CH_ID];
    endcase
  endfunction
  always_comb begin
    for (int c = 0; c < NM; c++) frame[c] = cor[c];
    frame[CH_AUX0]   = aux_word(aux_sel[1:0]);
    frame[CH_AUX0+1] = aux_word(aux_sel[3:2]);
  end

  logic              mem_we, rec_armed, rec_recording, rec_done;
  logic [MEM_AW-1:0] mem_waddr;
  logic [15:0]       mem_wdata, mem_rdata;
  logic [MEM_AW:0]   rec_words;
  waveform_recorder #(.NCH(NC), .AW(MEM_AW), .DW(16)) u_rec (
    .clk, .rst_n, .arm(rec_arm), .stop(rec_stop), .trigger(trig_s2 && !trig_s3),
    .in_valid(cor_valid), .in_data(frame), .mem_we, .mem_addr(mem_waddr), .mem_wdata,
    .armed(rec_armed), .recording(rec_recording), .done(rec_done), .words(rec_words));
  sample_memory #(.AW(MEM_AW), .DW(16)) u_mem (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata), .raddr(maddr), .rdata(mem_rdata));

  // ---------------- host register reads
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bus_rdata <= '0;
    else if (rd) begin
      if (bus_addr < 12'h080) bus_rdata <= set_rdata;
      else if (bus_addr >= 12'h0C0 && bus_addr < 12'h0C0 + 12'(NC)) bus_rdata <= frame[int'(bus_addr) - 'hC0];
      else begin
        case (bus_addr)
          12'h080: bus_rdata <= {5'b0, rec_done, rec_recording, rec_armed, cos_ovf, alarm0,
                                 actions[A_L3], actions[A_OPEN_CB], actions[A_L1], fd_not_ready,
                                 crc_error, unlock_s};
          12'h081: bus_rdata <= latched[15:0];
          12'h082: bus_rdata <= {8'b0, latched[23:16]};
          12'h083: bus_rdata <= faults[15:0];
          12'h084: bus_rdata <= {8'b0, faults[23:16]};
          12'h088: bus_rdata <= {12'b0, aux_sel};
          12'h089: bus_rdata <= {4'b0, dcct_en};
          12'h08A: bus_rdata <= {4'b0, dcct_ok};
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
