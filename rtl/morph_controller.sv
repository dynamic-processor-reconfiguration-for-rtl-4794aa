// morph_controller: carries out a change of core mode.
//
// The controller owns the registers through which the core is reconfigured:
// the Voltage Control Register (VCR, read by the voltage regulator), the
// Frequency Control Register (FCR, the PLL's frequency divider setting) and the
// Configuration Control Register (CCR, which banks and lanes are powered). When
// the decision logic asks for a mode other than the current one it
//   1. drains the pipeline (`drain_req` until the core answers `drained`),
//   2. writes the new mode's VCR and FCR values,
//   3. resizes ROB, LSQ and IQ and the fetch, decode and issue lanes, one bank
//      or lane per clock (staggered power gating, to avoid current surges),
//      a bank being switched off only once it holds no entries,
//   4. waits for the regulator (`vrm_ready`) and PLL (`pll_locked`) to settle,
//   5. resumes execution in the new mode (`mode_changed` pulses).
// Decisions that arrive while a switch is in progress, or that name the
// current mode, are ignored. `switches` counts completed switches and
// `last_overhead` gives the cycles the last switch took.
//
// Follows the published design: the VCR/FCR/CCR registers, pipeline drain,
// per-bank power gating with bank sizes 16 (ROB, LSQ) and 8 (IQ), one bank per
// cycle, least-occupied bank first and only when empty, and the mode table.
// Own choices: the order of the steps, the VCR unit (mV), the FCR encoding
// (PLL multiplier of a 100 MHz reference), the one-bit handshakes with the
// core, the regulator and the PLL, and rounding a size up to whole banks (the
// 36-entry IQ of the average mode uses five 8-entry banks).
module morph_controller
  import morph_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // decision
  input  logic        dec_valid,
  input  mode_e       dec_mode,
  // core pipeline
  output logic        drain_req,
  input  logic        drained,
  input  logic [4:0]  rob_occ [ROB_BANKS],   // used entries per ROB bank
  input  logic [4:0]  lsq_occ [LSQ_BANKS],
  input  logic [3:0]  iq_occ  [IQ_BANKS],
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
  // status
  output mode_e       cur_mode,
  output logic        morphing,
  output logic        mode_changed,
  output logic [31:0] switches,
  output logic [15:0] last_overhead
);
  typedef enum logic [2:0] {S_RUN, S_DRAIN, S_SETVF, S_GATE, S_SETTLE, S_RESUME} state_e;
  state_e state_q;
  mode_e  tgt_q;
  logic [15:0] ovh_q;

  // targets follow the target mode while switching, else the current mode
  mode_e     cfg_m;
  mode_cfg_t cfg;
  assign cfg_m = (state_q == S_RUN) ? cur_mode : tgt_q;
  assign cfg   = mode_cfg(cfg_m);

  localparam int unsigned NG = 6;
  logic [NG-1:0] want, grant, at_tgt;
  logic [3:0]    lane_occ4 [MAX_WIDTH];
  always_comb for (int i = 0; i < MAX_WIDTH; i++) lane_occ4[i] = '0;

  // one power-gating action per clock: fixed-priority grant
  always_comb begin
    grant = '0;
    if (state_q == S_GATE)
      for (int g = NG - 1; g >= 0; g--)
        if (want[g]) grant = NG'(1) << g;
  end

  bank_group_ctrl #(.N(ROB_BANKS), .OCC_W(5), .RESET_ON(8)) u_rob (
    .clk, .rst_n, .target(5'(banks_for(cfg.rob, ROB_BANK))), .occ(rob_occ),
    .grant(grant[0]), .want(want[0]), .en(ccr_rob_en), .at_target(at_tgt[0]));
  bank_group_ctrl #(.N(LSQ_BANKS), .OCC_W(5), .RESET_ON(8)) u_lsq (
    .clk, .rst_n, .target(4'(banks_for(cfg.lsq, LSQ_BANK))), .occ(lsq_occ),
    .grant(grant[1]), .want(want[1]), .en(ccr_lsq_en), .at_target(at_tgt[1]));
  bank_group_ctrl #(.N(IQ_BANKS), .OCC_W(4), .RESET_ON(5)) u_iq (
    .clk, .rst_n, .target(3'(banks_for(cfg.iq, IQ_BANK))), .occ(iq_occ),
    .grant(grant[2]), .want(want[2]), .en(ccr_iq_en), .at_target(at_tgt[2]));
  bank_group_ctrl #(.N(MAX_WIDTH), .OCC_W(4), .RESET_ON(4)) u_fetch (
    .clk, .rst_n, .target(3'(cfg.fetch_w)), .occ(lane_occ4),
    .grant(grant[3]), .want(want[3]), .en(ccr_fetch_en), .at_target(at_tgt[3]));
  bank_group_ctrl #(.N(MAX_WIDTH), .OCC_W(4), .RESET_ON(4)) u_decode (
    .clk, .rst_n, .target(3'(cfg.fetch_w)), .occ(lane_occ4),
    .grant(grant[4]), .want(want[4]), .en(ccr_decode_en), .at_target(at_tgt[4]));
  bank_group_ctrl #(.N(MAX_WIDTH), .OCC_W(4), .RESET_ON(4)) u_issue (
    .clk, .rst_n, .target(3'(cfg.issue_w)), .occ(lane_occ4),
    .grant(grant[5]), .want(want[5]), .en(ccr_issue_en), .at_target(at_tgt[5]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= S_RUN;
      tgt_q         <= MODE_AC;
      cur_mode      <= MODE_AC;
      vcr           <= mode_cfg(MODE_AC).volt_mv;
      fcr           <= fcr_value(MODE_AC);
      ovh_q         <= '0;
      switches      <= '0;
      last_overhead <= '0;
      mode_changed  <= 1'b0;
    end else begin
      mode_changed <= 1'b0;
      if (state_q != S_RUN && ovh_q != '1) ovh_q <= ovh_q + 16'd1;
      unique case (state_q)
        S_RUN: if (dec_valid && dec_mode != cur_mode) begin
          tgt_q   <= dec_mode;
          ovh_q   <= 16'd1;
          state_q <= S_DRAIN;
        end
        S_DRAIN:  if (drained) state_q <= S_SETVF;
        S_SETVF: begin
          vcr     <= mode_cfg(tgt_q).volt_mv;
          fcr     <= fcr_value(tgt_q);
          state_q <= S_GATE;
        end
        S_GATE:   if (&at_tgt) state_q <= S_SETTLE;
        S_SETTLE: if (vrm_ready && pll_locked) state_q <= S_RESUME;
        S_RESUME: begin
          cur_mode      <= tgt_q;
          switches      <= switches + 32'd1;
          last_overhead <= ovh_q;
          mode_changed  <= 1'b1;
          state_q       <= S_RUN;
        end
        default: state_q <= S_RUN;
      endcase
    end
  end

  assign drain_req = (state_q != S_RUN);
  assign morphing  = (state_q != S_RUN);

  // a switch never leaves a powered-on bank count different from the mode's
  // once execution resumes
  a_cfg_matches: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_RESUME) |-> (&at_tgt));

endmodule
