// Fault table of one rectifier section.
//
// Evaluates, every clock, the 24 fault conditions of the section from the
// corrected measurements (1 A / 1 V per LSB), the discrete inputs, the trip
// settings and three timers, and registers them as faults (the live
// conditions). Level 0 faults are alarms only. Level 1, 2 and 3 faults are
// also held in latched until fault_reset, which clears every latched bit
// whose condition has gone. The protective actions follow from the latched
// levels: Level 1 or 3 suppresses the power modules and fires the bypass
// modules, Level 2 opens the AC feeder breaker, Level 3 also closes the DC
// ground switch.
//
// Channels: meas[3m+p] is the ACCT of power module m, phase p (A, B, C);
// meas[18+k] is bypass leg DCCT k; meas[30] is the section current Id and
// meas[31] the bridge output voltage Vd. supply_mv holds the measured local
// supply voltages (+24, +15, -15, +5 V, in mV); 1K trips when any of them is
// more than trip[T_1K_TOL] percent (5-10) away from nominal, or when a
// supply's own OK contact in din drops.
//
// The conditions, levels and actions follow the fault table of the
// requirements. This design's choices are: the reading of the imbalance
// sums as |A+B+C| per module, the thresholds ZERO_A (a bypass leg current
// counted as zero), ID_ON_A (Id counted as flowing for the overtime timer)
// and HALF_CYCLE_US (the half cycle after suppression), fault latching and
// its reset.
// The Reset discrete in din is not read here: the FPGA combines it with the
// host's reset request into fault_reset.
// Timing: faults follow the inputs by one clock; timers count tick_ms or
// tick_us.
module section_fault_logic
  import fd_pkg::*;
#(
  parameter int NCH           = 32,
  parameter int BYPASS_ON_A   = 465,
  parameter int ZERO_A        = 50,
  parameter int ID_ON_A       = 100,
  parameter int HALF_CYCLE_US = 8333
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [15:0] meas [NCH],
  input  logic signed [15:0] trip [N_TRIP],
  input  logic signed [15:0] supply_mv [N_SUPPLY],
  input  section_din_t       din,
  input  logic               fd_not_ready,
  input  logic               tick_us,
  input  logic               tick_ms,
  input  logic               fault_reset,
  output faults_t            faults,
  output faults_t            latched,
  output logic               alarm0,
  output logic [N_ACT-1:0]   actions
);
  function automatic logic signed [17:0] abs18(logic signed [17:0] v);
    return (v < 0) ? -v : v;
  endfunction

  logic [15:0] water_ms, overtime_ms;
  logic [15:0] suppr_us;
  logic        suppr_elapsed;
  faults_t     f;
  logic [23:0] lat;

  // 1K window: |v - nominal| * 100 > tolerance * |nominal|
  logic supply_bad;
  always_comb begin
    int dev, lim;
    supply_bad = 1'b0;
    for (int k = 0; k < N_SUPPLY; k++) begin
      dev = int'(supply_mv[k]) - int'(SUPPLY_NOM_MV[k]);
      lim = int'(trip[T_1K_TOL]) * ((SUPPLY_NOM_MV[k] < 0) ? -int'(SUPPLY_NOM_MV[k]) : int'(SUPPLY_NOM_MV[k]));
      if (((dev < 0) ? -dev : dev) * 100 > lim) supply_bad = 1'b1;
    end
  end

  always_comb begin
    logic signed [17:0] sum3, dmax, dmin, a;
    logic any_noconduct, all_zero, any_bp_block, any_bp_oc, any_mod_oc, any_suppr;
    f = '0;
    // 0A: 3-phase sum of each power module
    for (int m = 0; m < 6; m++) begin
      sum3 = 18'(meas[3*m]) + 18'(meas[3*m+1]) + 18'(meas[3*m+2]);
      if (abs18(sum3) > 18'(trip[T_0A_IMBAL])) f.f0a_mod_imbal = 1'b1;
    end
    // Power module leg currents
    any_mod_oc = 1'b0;
    any_suppr  = 1'b0;
    for (int i = 0; i < N_ACCT; i++) begin
      a = abs18(18'(meas[i]));
      if (a > 18'(trip[T_1A_MODOC])) any_mod_oc = 1'b1;
      if (a > 18'(trip[T_2A_SUPPR])) any_suppr  = 1'b1;
    end
    // Bypass legs
    dmax = 18'(meas[CH_DCCT0]);
    dmin = 18'(meas[CH_DCCT0]);
    any_noconduct = 1'b0;
    all_zero      = 1'b1;
    any_bp_block  = 1'b0;
    any_bp_oc     = 1'b0;
    for (int k = 0; k < N_DCCT; k++) begin
      a = 18'(meas[CH_DCCT0+k]);
      if (a > dmax) dmax = a;
      if (a < dmin) dmin = a;
      if (a < 18'(BYPASS_ON_A))            any_noconduct = 1'b1;
      if (abs18(a) >= 18'(ZERO_A))         all_zero      = 1'b0;
      if (a > 18'(trip[T_1C_BPBLOCK]))     any_bp_block  = 1'b1;
      if (a > 18'(trip[T_3A_BPOC]))        any_bp_oc     = 1'b1;
    end
    // Level 0
    f.f0b_bp_imbal     = (dmax - dmin) > 18'(trip[T_0B_BPIMBAL]);
    f.f0c_bp_noconduct = any_noconduct && !din.bypass_block && (meas[CH_VD] < 0);
    f.f0d_fg           = !din.fg_ready;
    f.f0e_mgd          = !din.mgd_ok;
    f.f0f_water        = !din.flow_ok;
    f.f0g_pt_fail      = |din.pt_fail;
    // Level 1
    f.f1a_mod_oc     = any_mod_oc;
    f.f1b_sect_oc    = meas[CH_ID] > trip[T_1B_SECTOC];
    f.f1c_bp_block   = any_bp_block && !din.bypass_cmd;
    f.f1d_water_perm = (water_ms > trip[T_1D_WATER]) && din.permissive;
    f.f1e_cb_adv     = din.cb_adv_trip;
    f.f1f_ovs_fuse   = din.ovs_fuse;
    f.f1g_overtime   = overtime_ms > trip[T_1G_OVERT];
    f.f1h_loss_ac    = (|din.pt_fail) && !din.cb_adv_trip;
    f.f1i_ext_l1     = din.ext_l1;
    f.f1j_perm_seq   = din.permissive && fd_not_ready;
    f.f1k_dc_power   = (din.supply_ok != 4'hF) || supply_bad;
    f.f1o_link_loss  = !din.cmd_link_ok && din.permissive;
    f.f1p_perm_loss  = !din.permissive && din.convert;
    // Level 2
    f.f2a_suppr_fail = suppr_elapsed && any_suppr;
    // Level 3
    f.f3a_bp_oc       = any_bp_oc;
    f.f3b_all_bp_fail = !din.bypass_block && all_zero && (18'(meas[CH_VD]) < -18'(trip[T_3B_NEGV]));
    f.f3c_ext_l3      = din.ext_l3;
  end

  assign suppr_elapsed = suppr_us >= 16'(HALF_CYCLE_US);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      faults      <= '0;
      lat         <= '0;
      water_ms    <= '0;
      overtime_ms <= '0;
      suppr_us    <= '0;
    end else begin
      faults <= f;
      if (fault_reset) lat <= f & ~L0_MASK;
      else             lat <= lat | (f & ~L0_MASK);
      // loss of cooling water timer
      if (din.flow_ok)                             water_ms <= '0;
      else if (tick_ms && water_ms != 16'hFFFF)    water_ms <= water_ms + 1'b1;
      // section current duration timer
      if (meas[CH_ID] <= 16'(ID_ON_A))             overtime_ms <= '0;
      else if (tick_ms && overtime_ms != 16'hFFFF) overtime_ms <= overtime_ms + 1'b1;
      // time since suppression was commanded
      if (!actions[A_SUPPRESS])                    suppr_us <= '0;
      else if (tick_us && !suppr_elapsed)          suppr_us <= suppr_us + 1'b1;
    end
  end

  assign latched = lat;
  assign alarm0  = |(faults & L0_MASK);

  always_comb begin
    logic l1, l2, l3;
    l1 = |(lat & L1_MASK);
    l2 = |(lat & L2_MASK);
    l3 = |(lat & L3_MASK);
    actions             = '0;
    actions[A_L1]       = l1;
    actions[A_L3]       = l3;
    actions[A_SUPPRESS] = l1 | l3;
    actions[A_FIRE_BP]  = l1 | l3;
    actions[A_OPEN_CB]  = l2;
    actions[A_GND_SW]   = l3;
  end
endmodule
