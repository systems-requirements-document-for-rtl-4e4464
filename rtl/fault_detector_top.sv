// Digital part of the new fault detector for one Transrex power supply.
//
// Three FPGAs share one host bus: section_fpga instances for rectifier
// sections A and B and the common_fpga. Each section FPGA samples its 32
// analog inputs, evaluates the fault table and drives six toggled fault lines
// with a companion clock; those lines leave the unit and are also fed back to
// the watchdogs in the common FPGA. One start event from the facility clock
// interface (rec_trigger) starts all three waveform recorders.
//
// Host bus: bus_addr[13:12] selects the FPGA (0 section A, 1 section B,
// 2 common), bus_addr[11:0] the register in it (see each FPGA). bus_rdata is
// valid one clock after bus_rd. The key switch (unlock) enables settings
// writes in all three. Analog front ends, the ADCs, the facility clock
// receiver, the host computer and the front panel are outside this RTL and
// meet it at these ports. The partition follows the block diagram of the
// requirements; the bus and its decoding are this design's choice.
module fault_detector_top
  import fd_pkg::*;
#(
  parameter int CLK_HZ = 50_000_000,
  parameter int ADC_HZ = 128_000,
  parameter int MEM_AW = 22
) (
  input  logic               clk,
  input  logic               rst_n,
  // section A
  output logic               adc_convert_a,
  input  logic               adc_valid_a,
  input  logic signed [13:0] adc_a [SECT_NMEAS],
  input  section_din_t       din_a,
  input  logic signed [15:0] supply_mv_a [N_SUPPLY],
  input  logic [11:0]        dcct_ok_a,
  output logic [11:0]        dcct_en_a,
  output logic               fclk_a,
  output logic [N_ACT-1:0]   fline_a,
  // section B
  output logic               adc_convert_b,
  input  logic               adc_valid_b,
  input  logic signed [13:0] adc_b [SECT_NMEAS],
  input  section_din_t       din_b,
  input  logic signed [15:0] supply_mv_b [N_SUPPLY],
  input  logic [11:0]        dcct_ok_b,
  output logic [11:0]        dcct_en_b,
  output logic               fclk_b,
  output logic [N_ACT-1:0]   fline_b,
  // common section
  output logic               adc_convert_c,
  input  logic               adc_valid_c,
  input  logic signed [13:0] adc_c [COMMON_NCH],
  input  logic [31:0]        status_c,
  output logic               fclk_c,
  output logic [1:0]         fline_c,
  // shared
  input  logic               unlock,
  input  logic               rec_trigger,
  input  logic [13:0]        bus_addr,
  input  logic               bus_wr,
  input  logic               bus_rd,
  input  logic [15:0]        bus_wdata,
  output logic [15:0]        bus_rdata
);
  logic [15:0] rdata_a, rdata_b, rdata_c;
  logic [1:0]  sel_q;
  logic [N_ACT-1:0] sec_line [2];

  section_fpga #(.CLK_HZ(CLK_HZ), .ADC_HZ(ADC_HZ), .MEM_AW(MEM_AW)) u_sec_a (
    .clk, .rst_n, .adc_convert(adc_convert_a), .adc_valid(adc_valid_a), .adc_data(adc_a),
    .din(din_a), .supply_mv(supply_mv_a), .unlock, .dcct_ok(dcct_ok_a), .dcct_en(dcct_en_a),
    .fault_clk(fclk_a), .fault_line(fline_a), .rec_trigger,
    .bus_sel(bus_addr[13:12] == 2'd0), .bus_addr(bus_addr[11:0]), .bus_wr, .bus_rd, .bus_wdata,
    .bus_rdata(rdata_a));

  section_fpga #(.CLK_HZ(CLK_HZ), .ADC_HZ(ADC_HZ), .MEM_AW(MEM_AW)) u_sec_b (
    .clk, .rst_n, .adc_convert(adc_convert_b), .adc_valid(adc_valid_b), .adc_data(adc_b),
    .din(din_b), .supply_mv(supply_mv_b), .unlock, .dcct_ok(dcct_ok_b), .dcct_en(dcct_en_b),
    .fault_clk(fclk_b), .fault_line(fline_b), .rec_trigger,
    .bus_sel(bus_addr[13:12] == 2'd1), .bus_addr(bus_addr[11:0]), .bus_wr, .bus_rd, .bus_wdata,
    .bus_rdata(rdata_b));

  assign sec_line[0] = fline_a;
  assign sec_line[1] = fline_b;

  common_fpga #(.CLK_HZ(CLK_HZ), .ADC_HZ(ADC_HZ), .MEM_AW(MEM_AW)) u_common (
    .clk, .rst_n, .adc_convert(adc_convert_c), .adc_valid(adc_valid_c), .adc_data(adc_c),
    .status_in(status_c), .unlock, .sec_clk({fclk_b, fclk_a}), .sec_line,
    .fault_clk(fclk_c), .fault_line(fline_c), .rec_trigger,
    .bus_sel(bus_addr[13:12] == 2'd2), .bus_addr(bus_addr[11:0]), .bus_wr, .bus_rd, .bus_wdata,
    .bus_rdata(rdata_c));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      sel_q <= '0;
    else if (bus_rd) sel_q <= bus_addr[13:12];

  always_comb begin
    case (sel_q)
      2'd0:    bus_rdata = rdata_a;
      2'd1:    bus_rdata = rdata_b;
      2'd2:    bus_rdata = rdata_c;
      default: bus_rdata = 16'h0000;
    endcase
  end
endmodule
