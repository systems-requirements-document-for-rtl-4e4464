// Shared types and constants of the fault detector.
//
// The fault detector protects one Transrex power supply with two rectifier
// sections. Each section FPGA sees 34 analog channels (18 ACCT, 12 DCCT, the
// section input current, the output voltage and two auxiliary channels),
// evaluates the fault table of Levels 0-3 and records data; a common FPGA
// handles 8 shared channels and the watchdogs.
//
// Measurements are signed 16-bit values in engineering units: 1 A per LSB for
// currents, 1 V per LSB for voltages. Timer settings are in milliseconds.
// The channel order, the bit order of the fault word and the trip-setting
// order below are choices of this design; the channel counts, the trip ranges
// and the 40-bit/24-bit change-of-state word follow the requirements.
package fd_pkg;

  localparam int ADC_W   = 14;   // 14-bit ADC
  localparam int DW      = 16;   // stored word width
  localparam int N_ACCT  = 18;   // 6 power modules x 3 phases
  localparam int N_DCCT  = 12;   // bypass legs
  localparam int SECT_NCH   = 34;  // 32 measured + 2 auxiliary
  localparam int SECT_NMEAS = 32;  // channels that come from the ADC
  localparam int CH_DCCT0 = 18;
  localparam int CH_ID    = 30;  // section input current
  localparam int CH_VD    = 31;  // section output voltage
  localparam int CH_AUX0  = 32;
  localparam int COMMON_NCH = 8;

  // Trip settings of a section, in table order.
  typedef enum logic [3:0] {
    T_0A_IMBAL   = 4'd0,  // power module imbalance, A
    T_0B_BPIMBAL = 4'd1,  // bypass leg imbalance, A
    T_1A_MODOC   = 4'd2,  // power module overcurrent, A
    T_1B_SECTOC  = 4'd3,  // section overcurrent, A
    T_1C_BPBLOCK = 4'd4,  // bypass fail to block, A
    T_1D_WATER   = 4'd5,  // loss of water with permissive, ms
    T_1G_OVERT   = 4'd6,  // section current overtime, ms
    T_2A_SUPPR   = 4'd7,  // failure to suppress, A
    T_3A_BPOC    = 4'd8,  // bypass leg overcurrent, A
    T_3B_NEGV    = 4'd9,  // negative bridge voltage, V
    T_1K_TOL     = 4'd10  // DC power supply window, percent of nominal
  } trip_e;
  localparam int N_TRIP = 11;

  typedef logic signed [DW-1:0] word_t;
  typedef word_t trip_arr_t [N_TRIP];

  // Fixed bounds of every trip setting (adjustable ranges of the fault table).
  localparam trip_arr_t TRIP_MIN = '{16'sd0, 16'sd0, 16'sd0, 16'sd2500, 16'sd0,
                                     16'sd0, 16'sd0, 16'sd0, 16'sd0, 16'sd0, 16'sd5};
  localparam trip_arr_t TRIP_MAX = '{16'sd3380, 16'sd6670, 16'sd6570, 16'sd27500, 16'sd1000,
                                     16'sd10000, 16'sd18000, 16'sd1000, 16'sd6670, 16'sd500,
                                     16'sd10};

  // Nominal voltages of the local supplies checked by fault 1K, in mV:
  // +24 V, +15 V, -15 V, +5 V.
  localparam int N_SUPPLY = 4;
  typedef word_t supply_arr_t [N_SUPPLY];
  localparam supply_arr_t SUPPLY_NOM_MV = '{16'sd24000, 16'sd15000, -16'sd15000, 16'sd5000};

  // Section fault bits, one per row of the fault table.
  typedef struct packed {
    // Level 3
    logic f3c_ext_l3;
    logic f3b_all_bp_fail;
    logic f3a_bp_oc;
    // Level 2
    logic f2a_suppr_fail;
    // Level 1
    logic f1p_perm_loss;
    logic f1o_link_loss;
    logic f1k_dc_power;
    logic f1j_perm_seq;
    logic f1i_ext_l1;
    logic f1h_loss_ac;
    logic f1g_overtime;
    logic f1f_ovs_fuse;
    logic f1e_cb_adv;
    logic f1d_water_perm;
    logic f1c_bp_block;
    logic f1b_sect_oc;
    logic f1a_mod_oc;
    // Level 0
    logic f0g_pt_fail;
    logic f0f_water;
    logic f0e_mgd;
    logic f0d_fg;
    logic f0c_bp_noconduct;
    logic f0b_bp_imbal;
    logic f0a_mod_imbal;
  } faults_t;

  localparam logic [23:0] L0_MASK = 24'h00_007F;
  localparam logic [23:0] L1_MASK = 24'h0F_FF80;
  localparam logic [23:0] L2_MASK = 24'h10_0000;
  localparam logic [23:0] L3_MASK = 24'hE0_0000;

  // Discrete status inputs of a section (active high as named).
  typedef struct packed {
    logic       permissive;
    logic       ext_l1;       // external Level 1 fault
    logic       ext_l3;       // external Level 3 fault
    logic       reset;        // fault reset
    logic       cmd_link_ok;  // command link ready
    logic       convert;      // convert bit (gate pulses to power modules)
    logic       bypass_cmd;   // bypass bit (gate pulses to bypass modules)
    logic       bypass_block; // block bypass
    logic       cb_adv_trip;  // AC breaker advance trip
    logic [1:0] pt_fail;      // PT undervoltage relays
    logic       fg_ready;     // firing generator ready
    logic       flow_ok;      // cooling water flow switch
    logic       mgd_ok;       // MGD box
    logic       ovs_fuse;     // AC overvoltage suppressor fuse blown
    logic [3:0] supply_ok;    // OK contacts of +24 V, +15 V, -15 V, +5 V
  } section_din_t;

  // Protective actions, index of the fault line that carries each one.
  localparam int A_L1 = 0, A_L3 = 1, A_SUPPRESS = 2, A_FIRE_BP = 3, A_OPEN_CB = 4, A_GND_SW = 5;
  localparam int N_ACT = 6;

  // One change-of-state record: 40-bit status and 24-bit 1 us time stamp.
  typedef struct packed {
    logic [39:0] status;
    logic [23:0] stamp;
  } cos_entry_t;

  // CRC-16-CCITT (x^16 + x^12 + x^5 + 1) of one 16-bit word, MSB first.
  function automatic logic [15:0] crc16_word(logic [15:0] crc, logic [15:0] data);
    logic [15:0] c;
    c = crc;
    for (int i = 15; i >= 0; i--) begin
      if (c[15] ^ data[i]) c = {c[14:0], 1'b0} ^ 16'h1021;
      else                 c = {c[14:0], 1'b0};
    end
    return c;
  endfunction

endpackage
