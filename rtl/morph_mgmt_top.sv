// morph_mgmt_top: online morphing management of a four-mode morphable core.
//
// A single out-of-order core can take one of four modes: average (AC), narrow
// and fast (NC), larger window (LW) and small (SM), differing in fetch/issue
// width, ROB/LSQ/IQ size, clock frequency and voltage. Switching is cheap
// because caches, register file and predictors stay in place, so the mode can
// follow the program at a granularity of a few thousand instructions. This top
// wires the decision and control path that makes that possible:
//
//   core events -> pmc_counters -> ips2w_estimator -> mode_history -> morph_controller
//                  (per window)    (IPS^2/W of all     (vote over     (drain, VCR/FCR,
//                                   modes, MAC based)   4 windows)     bank gating)
//
// Every WINDOW_LEN committed instructions the counters are frozen and the
// estimator predicts power and IPC of all modes from them, recommending the
// mode with the best IPS^2/Watt if it beats the current one by the threshold.
// After HISTORY_DEPTH windows the most frequent recommendation is taken and, if
// it differs from the current mode, the controller morphs the core. Counting
// pauses while the core is being morphed; the vote history is cleared after a
// switch.
//
// Reliability-aware policy: with `rpe_policy` high the recommendation that
// enters the vote comes from rpe_selector instead, which weighs the same
// IPC/power estimates against the soft-error rate (per-mode AVF estimates come
// in on `avf`, from a regression outside this block) and switches only for a
// 4 % gain in reliability-power efficiency. Change `rpe_policy` only between
// windows.
//
// Side by side, with its own ports, sits the phase detector of the asymmetric
// multi-core variant (btv_phase_detector): there a thread is migrated between
// cores when it enters a new stable phase, classified from bottleneck-stall
// counts over 50K-instruction intervals. It shares only clock and reset.
//
// Also side by side, on the `oi_*` ports, sits the management of the two-mode
// variant (ooo_ino_manager with its own pmc_counters): a core that turns
// from 4-wide out-of-order into 2-wide in-order by gating its ROB, RAT, LSQ and
// part of its lanes and units, deciding every 6 windows of 500 instructions
// with a 4 % threshold.
//
// The out-of-order pipeline itself, the caches, the voltage regulator and the
// PLL are outside this block: their signals are the ports. The structure and
// parameters follow the published design (window 500, history depth 4,
// threshold 5 %, the mode table, RPE weights and threshold, BTV interval,
// threshold and m, and the two-mode window, depth 6 and 4 % threshold); the
// port encodings, the policy pin and the exact hand-over between the blocks
// are this design's own.
module morph_mgmt_top
  import morph_pkg::*;
#(
  parameter int unsigned WINDOW_LEN    = 500,
  parameter int unsigned HISTORY_DEPTH = 4,
  parameter fx_t         THRESH        = fx_t'(3277),  // 5 % in Q16.16
  parameter int unsigned BTV_INTERVAL  = 50000,
  parameter fx_t         BTV_THRESH    = fx_t'(5571),  // 8.5 %
  parameter int unsigned BTV_M         = 4,
  parameter int unsigned BTV_PHASES    = 8,
  parameter int unsigned OI_WINDOW     = 500,
  parameter int unsigned OI_HISTORY    = 6,
  parameter fx_t         OI_THRESH     = fx_t'(2621)   // 4 %
) (
  input  logic        clk,
  input  logic        rst_n,
  // core pipeline events and buffer occupancy
  input  pmc_event_t  ev,
  input  logic [4:0]  rob_occ [ROB_BANKS],
  input  logic [4:0]  lsq_occ [LSQ_BANKS],
  input  logic [3:0]  iq_occ  [IQ_BANKS],
  output logic        drain_req,
  input  logic        drained,
  // voltage regulator and PLL
  output logic [15:0] vcr,
  output logic [7:0]  fcr,
  input  logic        vrm_ready,
  input  logic        pll_locked,
  // configuration control register
  output logic [ROB_BANKS-1:0] ccr_rob_en,
  output logic [LSQ_BANKS-1:0] ccr_lsq_en,
  output logic [IQ_BANKS-1:0]  ccr_iq_en,
  output logic [MAX_WIDTH-1:0] ccr_fetch_en,
  output logic [MAX_WIDTH-1:0] ccr_decode_en,
  output logic [MAX_WIDTH-1:0] ccr_issue_en,
  // regression coefficient table write port
  input  logic        cfg_we,
  input  mode_e       cfg_src,
  input  logic [2:0]  cfg_expr,
  input  logic [2:0]  cfg_term,
  input  term_t       cfg_data,
  // status
  output mode_e       cur_mode,
  output logic        morphing,
  output logic        win_valid,
  output logic        rec_valid,
  output mode_e       rec_mode,
  output logic        dec_valid,
  output mode_e       dec_mode,
  output logic [31:0] switches,
  output logic [15:0] last_overhead,
  output fx_t         est_ipc [NUM_MODES],
  output fx_t         est_pwr [NUM_MODES],
  // reliability-aware policy
  input  logic        rpe_policy,
  input  fx_t         avf [NUM_MODES],
  output logic        rpe_valid,
  output mode_e       rpe_mode,
  output fx_t         lrpe [NUM_MODES],
  // bottleneck-type-vector phase detection (asymmetric multi-core variant)
  input  logic        btv_restart,
  input  logic [2:0]  btv_commit,
  input  logic [5:0]  btv_stall,
  output logic        btv_valid,
  output fx_t         btv [7],
  output logic        btv_match,
  output logic        btv_new_phase,
  output logic        btv_unstable,
  output logic [$clog2(BTV_PHASES)-1:0]   btv_phase_id,
  output logic [$clog2(BTV_PHASES+1)-1:0] btv_num_phases,
  // two-mode out-of-order / in-order core
  input  pmc_event_t  oi_ev,
  output logic        oi_mode_ooo,
  output logic        oi_morphing,
  output logic        oi_mode_changed,
  output logic        oi_flush_req,
  input  logic        oi_flushed,
  output logic        oi_rob_ptr_reset,
  output logic        oi_rob_en,
  output logic        oi_rat_en,
  output logic        oi_lsq_en,
  output logic        oi_fpisq_en,
  output logic [3:0]  oi_fetch_en,
  output logic [3:0]  oi_decode_en,
  output logic [3:0]  oi_issue_en,
  output logic [3:0]  oi_int_alu_en,
  output logic [1:0]  oi_fp_alu_en,
  output logic [2:0]  oi_ls_unit_en,
  output logic        oi_win_valid,
  output logic        oi_rec_valid,
  output logic        oi_rec_other,
  output logic        oi_dec_valid,
  output logic        oi_dec_switch,
  output fx_t         oi_est_ipc_other,
  output fx_t         oi_est_pwr_other,
  output fx_t         oi_est_pwr_cur,
  output logic [31:0] oi_switches
);
  fx_t         pmc [NUM_PMC];
  logic        est_busy;
  logic        mode_changed;
  logic [31:0] win_cycles;
  logic [15:0] win_instr;
  logic [7:0]  mac_ops;
  logic        est_done;
  mode_e       est_mode;
  logic        rpe_busy;
  logic        btv_busy, btv_known;
  fx_t         btv_min_sad;
  fx_t         oi_pmc [NUM_PMC];
  logic [31:0] oi_win_cycles;
  logic [15:0] oi_win_instr;

  pmc_counters #(.WINDOW_LEN(WINDOW_LEN)) u_pmc (
    .clk, .rst_n,
    .enable     (!morphing),
    .ev         (ev),
    .pmc_valid  (win_valid),
    .pmc        (pmc),
    .win_cycles (win_cycles),
    .win_instr  (win_instr)
  );

  ips2w_estimator #(.THRESH(THRESH)) u_est (
    .clk, .rst_n,
    .start    (win_valid && !morphing),
    .cur_mode (cur_mode),
    .pmc      (pmc),
    .cfg_we, .cfg_src, .cfg_expr, .cfg_term, .cfg_data,
    .busy     (est_busy),
    .done     (est_done),
    .rec_mode (est_mode),
    .est_ipc  (est_ipc),
    .est_pwr  (est_pwr),
    .mac_ops  (mac_ops)
  );

  rpe_selector u_rpe (
    .clk, .rst_n,
    .start    (est_done && rpe_policy),
    .cur_mode (cur_mode),
    .ipc      (est_ipc),
    .pwr      (est_pwr),
    .avf      (avf),
    .busy     (rpe_busy),
    .done     (rpe_valid),
    .rec_mode (rpe_mode),
    .lrpe     (lrpe)
  );

  // the recommendation that enters the vote
  assign rec_valid = rpe_policy ? rpe_valid : est_done;
  assign rec_mode  = rpe_policy ? rpe_mode  : est_mode;

  mode_history #(.HISTORY_DEPTH(HISTORY_DEPTH)) u_hist (
    .clk, .rst_n,
    .flush     (mode_changed),
    .cur_mode  (cur_mode),
    .rec_valid (rec_valid),
    .rec_mode  (rec_mode),
    .dec_valid (dec_valid),
    .dec_mode  (dec_mode)
  );

  morph_controller u_ctrl (
    .clk, .rst_n,
    .dec_valid, .dec_mode,
    .drain_req, .drained,
    .rob_occ, .lsq_occ, .iq_occ,
    .vcr, .fcr, .vrm_ready, .pll_locked,
    .ccr_rob_en, .ccr_lsq_en, .ccr_iq_en,
    .ccr_fetch_en, .ccr_decode_en, .ccr_issue_en,
    .cur_mode, .morphing, .mode_changed,
    .switches, .last_overhead
  );

  btv_phase_detector #(
    .INTERVAL_LEN (BTV_INTERVAL),
    .THRESH       (BTV_THRESH),
    .M            (BTV_M),
    .NUM_PHASES   (BTV_PHASES)
  ) u_btv (
    .clk, .rst_n,
    .restart     (btv_restart),
    .commit      (btv_commit),
    .stall       (btv_stall),
    .busy        (btv_busy),
    .btv_valid   (btv_valid),
    .btv         (btv),
    .match       (btv_match),
    .new_phase   (btv_new_phase),
    .unstable    (btv_unstable),
    .phase_known (btv_known),
    .phase_id    (btv_phase_id),
    .min_sad     (btv_min_sad),
    .num_phases  (btv_num_phases)
  );

  pmc_counters #(.WINDOW_LEN(OI_WINDOW)) u_oi_pmc (
    .clk, .rst_n,
    .enable     (!oi_morphing),
    .ev         (oi_ev),
    .pmc_valid  (oi_win_valid),
    .pmc        (oi_pmc),
    .win_cycles (oi_win_cycles),
    .win_instr  (oi_win_instr)
  );

  ooo_ino_manager #(.HISTORY_DEPTH(OI_HISTORY), .THRESH(OI_THRESH)) u_oi (
    .clk, .rst_n,
    .pmc_valid     (oi_win_valid),
    .pmc           (oi_pmc),
    .mode_ooo      (oi_mode_ooo),
    .morphing      (oi_morphing),
    .mode_changed  (oi_mode_changed),
    .flush_req     (oi_flush_req),
    .flushed       (oi_flushed),
    .rob_ptr_reset (oi_rob_ptr_reset),
    .rob_en        (oi_rob_en),
    .rat_en        (oi_rat_en),
    .lsq_en        (oi_lsq_en),
    .fpisq_en      (oi_fpisq_en),
    .fetch_en      (oi_fetch_en),
    .decode_en     (oi_decode_en),
    .issue_en      (oi_issue_en),
    .int_alu_en    (oi_int_alu_en),
    .fp_alu_en     (oi_fp_alu_en),
    .ls_unit_en    (oi_ls_unit_en),
    .rec_valid     (oi_rec_valid),
    .rec_other     (oi_rec_other),
    .dec_valid     (oi_dec_valid),
    .dec_switch    (oi_dec_switch),
    .est_ipc_other (oi_est_ipc_other),
    .est_pwr_other (oi_est_pwr_other),
    .est_pwr_cur   (oi_est_pwr_cur),
    .switches      (oi_switches)
  );

  // a new window never arrives while the previous estimate is still running
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (win_valid && !morphing) |-> !est_busy);

endmodule
