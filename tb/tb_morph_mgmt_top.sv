// tb_morph_mgmt_top: end-to-end test of the morphing management path at its
// default (published) size: 500-instruction windows, a history of 4 windows,
// 5 % threshold, 16/8/6 ROB/LSQ/IQ banks.
//
// The core around the block is modelled: it commits one instruction per clock,
// reports counter events whose mix defines a program phase, keeps entries in
// its ROB/LSQ/IQ banks that drain slowly, acknowledges a drain request after a
// random delay, and its voltage regulator and PLL become ready a random time
// after VCR/FCR change. A regression table is loaded through the configuration
// port so that each phase favours a known mode: the IPC of mode m is estimated
// from one event type per mode, the power of each mode is close to the
// published per-mode power. Phases:
//   - dominant phases, one per mode, in which that mode wins by far;
//   - near-tie phases, in which another mode's estimate is around 3 % better
//     than the current one, so that some windows fall inside the threshold.
// Checks: every recommendation against a real-number model of the metric and
// threshold (skipping cases within 1 % of a boundary); every decision for a
// new mode starts a switch and a decision for the current mode does not; after
// every switch VCR, FCR and the number of powered banks and lanes match the
// mode table; at most one unit changes power state per clock; that the mode
// each dominant phase favours is reached. Every mechanism (windows,
// recommendations, decisions, decisions to stay, switches into each of the
// four modes, drains, waits for a bank to empty, waits for regulator/PLL,
// threshold holds) is counted and the test fails if one never happened.
// Then the reliability-aware policy is selected: the RPE recommendations are
// checked against a log-domain model, dominant phases must still be followed,
// and a mode made sixteen times as vulnerable (AVF) must never be entered even
// though it has the best IPS^2/Watt. Alongside, the bottleneck-type-vector
// phase detector runs at its full 50K-instruction interval on its own inputs:
// two phases must be stored, a return to the first matched and a one-interval
// glitch discarded. The two-mode OOO/in-order manager runs on its own event
// inputs too: a memory-bound phase must turn the core in-order (after the
// flush handshake, with the units of the in-order mode gated one per clock), a
// high-IPC phase must bring it back (with the ROB pointers reset), twice, and a
// further high-IPC phase must keep it out-of-order.
module tb_morph_mgmt_top;
  import morph_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  pmc_event_t  ev;
  logic [4:0]  rob_occ [ROB_BANKS];
  logic [4:0]  lsq_occ [LSQ_BANKS];
  logic [3:0]  iq_occ  [IQ_BANKS];
  logic        drain_req, drained, vrm_ready, pll_locked;
  logic [15:0] vcr;
  logic [7:0]  fcr;
  logic [ROB_BANKS-1:0] ccr_rob_en;
  logic [LSQ_BANKS-1:0] ccr_lsq_en;
  logic [IQ_BANKS-1:0]  ccr_iq_en;
  logic [MAX_WIDTH-1:0] ccr_fetch_en, ccr_decode_en, ccr_issue_en;
  logic        cfg_we;
  mode_e       cfg_src;
  logic [2:0]  cfg_expr, cfg_term;
  term_t       cfg_data;
  mode_e       cur_mode, rec_mode, dec_mode;
  logic        morphing, win_valid, rec_valid, dec_valid;
  logic [31:0] switches;
  logic [15:0] last_overhead;
  fx_t         est_ipc [NUM_MODES];
  fx_t         est_pwr [NUM_MODES];
  logic        rpe_policy, rpe_valid;
  fx_t         avf [NUM_MODES];
  mode_e       rpe_mode;
  fx_t         lrpe [NUM_MODES];
  logic        btv_restart, btv_valid, btv_match, btv_new_phase, btv_unstable;
  logic [2:0]  btv_commit;
  logic [5:0]  btv_stall;
  fx_t         btv [7];
  logic [2:0]  btv_phase_id;
  logic [3:0]  btv_num_phases;
  pmc_event_t  oi_ev;
  logic        oi_mode_ooo, oi_morphing, oi_mode_changed, oi_flush_req, oi_flushed;
  logic        oi_rob_ptr_reset, oi_rob_en, oi_rat_en, oi_lsq_en, oi_fpisq_en;
  logic [3:0]  oi_fetch_en, oi_decode_en, oi_issue_en, oi_int_alu_en;
  logic [1:0]  oi_fp_alu_en;
  logic [2:0]  oi_ls_unit_en;
  logic        oi_win_valid, oi_rec_valid, oi_rec_other, oi_dec_valid, oi_dec_switch;
  fx_t         oi_est_ipc_other, oi_est_pwr_other, oi_est_pwr_cur;
  logic [31:0] oi_switches;

  morph_mgmt_top dut (.*);

  int checks = 0, failures = 0;
  int n_win = 0, n_rec = 0, n_dec = 0, n_stay = 0, n_sw = 0, n_drain = 0;
  int n_bankwait = 0, n_vfwait = 0, n_hold = 0, n_cfg = 0, n_skip = 0;
  int visits [4];
  int n_rpe = 0, n_rpe_sw = 0, n_btv = 0, n_btv_new = 0, n_btv_match = 0, n_btv_unst = 0;
  bit lw_banned = 0;
  bit btv_done = 0;
  bit oi_done = 0;
  int n_oi_win = 0, n_oi_rec = 0, n_oi_stay = 0, n_oi_ino = 0, n_oi_ooo = 0;
  int n_oi_flush = 0, n_oi_rptr = 0;

  // mode table as the test sees it
  real t_f [4] = '{1.6, 2.0, 1.4, 1.2};
  real t_p [4] = '{2.2, 1.7, 2.4, 0.82};
  int  t_volt [4] = '{800, 1000, 800, 700};
  int  t_iq [4] = '{36, 24, 48, 12};
  int  t_lsq [4] = '{128, 64, 128, 16};
  int  t_rob [4] = '{128, 64, 256, 16};
  int  t_w [4] = '{4, 2, 4, 1};

  function automatic int popc(logic [15:0] v);
    int c = 0;
    for (int i = 0; i < 16; i++) c += int'(v[i]);
    return c;
  endfunction
  function automatic real fx2r(fx_t v);
    return real'(v) / 65536.0;
  endfunction
  // IPC of mode m is estimated from this counter
  function automatic pmc_e ipc_src(int m);
    case (m)
      0: return PMC_FP;
      1: return PMC_INT;
      2: return PMC_LD;
      default: return PMC_ST;
    endcase
  endfunction

  // ---------------- phase control
  int  phase_kind;   // 0: dominant, 1: near tie
  int  phase_mode;   // favoured mode of a dominant phase
  real p_ev [4];     // per-clock probability of each mode's event

  // ---------------- core model
  int drain_cnt = 0, vrm_cnt = 0, pll_cnt = 0;
  logic [15:0] vcr_d;
  logic [7:0]  fcr_d;
  always @(posedge clk) begin
    pmc_event_t e;
    e = '0;
    e.commit  = 3'd1;
    e.fetched = 3'($urandom % 3);
    e.l1_hit  = 3'($urandom % 2);
    e.l1_miss = 3'($urandom % 8 == 0);
    e.c_fp    = 3'(($urandom % 10000) < int'(p_ev[0] * 10000.0));
    e.c_int   = 3'(($urandom % 10000) < int'(p_ev[1] * 10000.0));
    e.c_ld    = 3'(($urandom % 10000) < int'(p_ev[2] * 10000.0));
    e.c_st    = 3'(($urandom % 10000) < int'(p_ev[3] * 10000.0));
    e.c_br    = 3'($urandom % 6 == 0);
    e.br_misp = 3'($urandom % 50 == 0);
    ev <= e;
    vcr_d <= vcr;
    fcr_d <= fcr;
    if (!drain_req) begin
      drained   <= 1'b0;
      drain_cnt <= 1 + $urandom % 30;
    end else if (drain_cnt > 0) drain_cnt <= drain_cnt - 1;
    else drained <= 1'b1;
    if (vcr != vcr_d) begin vrm_ready <= 1'b0; vrm_cnt <= 20 + $urandom % 200; end
    else if (vrm_cnt > 0) vrm_cnt <= vrm_cnt - 1;
    else vrm_ready <= 1'b1;
    if (fcr != fcr_d) begin pll_locked <= 1'b0; pll_cnt <= 20 + $urandom % 100; end
    else if (pll_cnt > 0) pll_cnt <= pll_cnt - 1;
    else pll_locked <= 1'b1;
    for (int i = 0; i < ROB_BANKS; i++)
      if (!ccr_rob_en[i]) rob_occ[i] <= 0;
      else if (!morphing && $urandom % 8 == 0) rob_occ[i] <= 5'($urandom % 17);
      else if (rob_occ[i] != 0 && $urandom % 3 == 0) rob_occ[i] <= rob_occ[i] - 1;
    for (int i = 0; i < LSQ_BANKS; i++)
      if (!ccr_lsq_en[i]) lsq_occ[i] <= 0;
      else if (!morphing && $urandom % 8 == 0) lsq_occ[i] <= 5'($urandom % 17);
      else if (lsq_occ[i] != 0 && $urandom % 3 == 0) lsq_occ[i] <= lsq_occ[i] - 1;
    for (int i = 0; i < IQ_BANKS; i++)
      if (!ccr_iq_en[i]) iq_occ[i] <= 0;
      else if (!morphing && $urandom % 8 == 0) iq_occ[i] <= 4'($urandom % 9);
      else if (iq_occ[i] != 0 && $urandom % 3 == 0) iq_occ[i] <= iq_occ[i] - 1;
  end

  // near-tie phase: another mode estimated ~3 % better than the current one
  always @(posedge clk) if (phase_kind == 1) begin
    int x, y;
    real ipc_y;
    x = int'(cur_mode);
    y = (x + 1) % 4;
    ipc_y = t_f[x] / t_f[y] * $sqrt(1.03 * t_p[y] / t_p[x]);
    for (int m = 0; m < 4; m++) p_ev[m] = 0.0;
    p_ev[y] = ipc_y / 0.01 / 500.0;
  end

  // ---------------- per-clock checks and counters
  logic [45:0] ccr_d, ccr_now;
  logic        drain_req_d;
  logic        ccr_d_ok = 1'b0;
  assign ccr_now = {ccr_rob_en, ccr_lsq_en, ccr_iq_en, ccr_fetch_en, ccr_decode_en, ccr_issue_en};
  always @(posedge clk) if (rst_n) begin
    ccr_d       <= ccr_now;
    ccr_d_ok    <= 1'b1;
    drain_req_d <= drain_req;
    if (drain_req && !drain_req_d) n_drain++;
    if (ccr_d_ok && ccr_d != ccr_now) begin
      checks++;
      if (popc(16'(ccr_d ^ ccr_now)) + popc(16'((ccr_d ^ ccr_now) >> 16)) +
          popc(16'((ccr_d ^ ccr_now) >> 32)) > 1) begin
        failures++; $display("FAIL: several units changed power state in one clock %t %h %h", $time, ccr_d, ccr_now);
      end
    end
    if (dut.u_ctrl.state_q == dut.u_ctrl.S_GATE &&
        ((!dut.u_ctrl.u_rob.at_target && !dut.u_ctrl.u_rob.want) ||
         (!dut.u_ctrl.u_lsq.at_target && !dut.u_ctrl.u_lsq.want) ||
         (!dut.u_ctrl.u_iq.at_target && !dut.u_ctrl.u_iq.want))) n_bankwait++;
    if (dut.u_ctrl.state_q == dut.u_ctrl.S_SETTLE && !(vrm_ready && pll_locked)) n_vfwait++;
    if (win_valid) n_win++;
    if (cfg_we) n_cfg++;
  end

  // recommendation model
  always @(posedge clk) if (rst_n && rec_valid && !rpe_policy) begin
    real r [4];
    real best_r, rc, ratio;
    int  c, bm;
    n_rec++;
    c = int'(cur_mode);
    for (int m = 0; m < 4; m++) begin
      real ipc, p;
      ipc = fx2r(est_ipc[m]);
      if (ipc < 0.0) ipc = 0.0;
      if (ipc > 8.0) ipc = 8.0;
      p = fx2r(est_pwr[m]);
      if (p < 0.01) p = 0.01;
      r[m] = (ipc * t_f[m]) * (ipc * t_f[m]) / p;
    end
    rc = r[c];
    bm = -1; best_r = 0.0;
    for (int m = 0; m < 4; m++)
      if (m != c && (bm < 0 || r[m] > best_r)) begin bm = m; best_r = r[m]; end
    ratio = (rc > 0.0) ? best_r / (rc * 1.05) : 1.0e9;
    if (ratio > 0.99 && ratio < 1.01) n_skip++;
    else begin
      int exp_m;
      real second;
      second = 0.0;
      for (int m = 0; m < 4; m++) if (m != c && m != bm && r[m] > second) second = r[m];
      exp_m = (ratio >= 1.01) ? bm : c;
      if (exp_m == bm && second > best_r * 0.99) n_skip++;
      else begin
        checks++;
        if (int'(rec_mode) != exp_m) begin
          failures++;
          $display("FAIL: rec %0d exp %0d cur %0d r=%f %f %f %f", rec_mode, exp_m, c, r[0], r[1], r[2], r[3]);
        end
        if (exp_m == c && best_r > rc * 1.001) n_hold++;
      end
    end
    // the current mode's IPC is the measured one: one instruction per clock
    checks++;
    if (est_ipc[c] != FX_ONE) begin
      failures++; $display("FAIL: measured IPC %0d", est_ipc[c]);
    end
  end

  // RPE recommendation model (log2 domain, a = 0.6, b = 0.4, 4 % threshold)
  always @(posedge clk) if (rst_n && rpe_valid) begin
    real l [4];
    real best, margin, second;
    int  c, bm, exp_m;
    n_rpe++;
    c = int'(cur_mode);
    for (int m = 0; m < 4; m++) begin
      real ipc, p, a;
      ipc = fx2r(est_ipc[m]);
      if (ipc > 8.0) ipc = 8.0;
      if (ipc * t_f[m] < 1.0 / 65536.0) ipc = 1.0 / 65536.0 / t_f[m];
      p = fx2r(est_pwr[m]);
      if (p < 1.0 / 65536.0) p = 1.0 / 65536.0;
      a = fx2r(avf[m]);
      if (a < 1.0 / 65536.0) a = 1.0 / 65536.0;
      l[m] = 0.6 * (2.0 * $ln(ipc * t_f[m]) - $ln(p)) / $ln(2.0)
           - 0.4 * ($ln(a) / $ln(2.0) + $ln(t_f[m] / 2.0) / $ln(2.0) + 0.01 * (1000 - t_volt[m]));
    end
    bm = -1; best = 0.0;
    for (int m = 0; m < 4; m++) if (m != c && (bm < 0 || l[m] > best)) begin bm = m; best = l[m]; end
    second = -1.0e9;
    for (int m = 0; m < 4; m++) if (m != c && m != bm && l[m] > second) second = l[m];
    exp_m = (best > l[c] + $ln(1.04) / $ln(2.0)) ? bm : c;
    margin = best - (l[c] + $ln(1.04) / $ln(2.0));
    if (margin < 0.0) margin = -margin;
    if (margin < 0.01 || (exp_m == bm && best - second < 0.01)) n_skip++;
    else begin
      checks++;
      if (int'(rpe_mode) != exp_m) begin
        failures++; $display("FAIL: RPE rec %0d exp %0d (cur %0d)", rpe_mode, exp_m, c);
      end
      if (exp_m != c) n_rpe_sw++;
    end
  end

  // a mode with a high vulnerability is never entered under the RPE policy
  always @(posedge clk) if (rst_n && lw_banned) begin
    checks++;
    if (morphing && dut.u_ctrl.tgt_q == MODE_LW) begin
      failures++; $display("FAIL: RPE policy moved to the vulnerable mode");
      lw_banned = 0;
    end
  end

  // decisions
  always @(posedge clk) if (rst_n && dec_valid) begin
    n_dec++;
    checks++;
    if (morphing) begin failures++; $display("FAIL: decision while morphing"); end
    if (dec_mode == cur_mode) n_stay++;
    fork
      begin
        mode_e d, c0;
        d = dec_mode; c0 = cur_mode;
        @(posedge clk); #1;
        checks++;
        if (morphing != (d != c0)) begin
          failures++; $display("FAIL: decision %0d in mode %0d, morphing=%0d", d, c0, morphing);
        end
      end
    join_none
  end

  // after each switch: mode table
  always @(posedge clk) if (rst_n && dut.mode_changed) begin
    int m;
    #1;
    m = int'(cur_mode);
    n_sw++;
    visits[m]++;
    checks++;
    if (int'(vcr) != t_volt[m] || int'(fcr) * 100 != int'(t_f[m] * 1000.0) ||
        popc(16'(ccr_rob_en)) != (t_rob[m] + 15) / 16 ||
        popc(16'(ccr_lsq_en)) != (t_lsq[m] + 15) / 16 ||
        popc(16'(ccr_iq_en))  != (t_iq[m] + 7) / 8 ||
        popc(16'(ccr_fetch_en)) != t_w[m] || popc(16'(ccr_decode_en)) != t_w[m] ||
        popc(16'(ccr_issue_en)) != t_w[m] || switches != 32'(n_sw)) begin
      failures++;
      $display("FAIL: after switch to %0d: sw %0d/%0d vcr %0d fcr %0d rob %b lsq %b iq %b f %b d %b i %b", m, switches, n_sw, vcr, fcr,
               ccr_rob_en, ccr_lsq_en, ccr_iq_en, ccr_fetch_en, ccr_decode_en, ccr_issue_en);
    end
  end

  initial begin
    #100000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- BTV phase detector (own inputs, 50K-instruction intervals)
  int btv_prof = 0;
  bit btv_last_match = 0;
  always @(posedge clk) begin
    logic [5:0] st;
    for (int i = 0; i < 6; i++)
      st[i] = ($urandom % 1000) < ((i == btv_prof) ? 400 : 30);
    btv_stall  <= st;
    btv_commit <= 3'(1 + (btv_prof == 2));
  end
  always @(posedge clk) if (rst_n && btv_valid) begin
    n_btv++;
    if (btv_new_phase) n_btv_new++;
    if (btv_match) n_btv_match++;
    btv_last_match = btv_match;
    if (btv_unstable) n_btv_unst++;
  end
  task automatic btv_run(int prof, int n);
    int k = 0;
    btv_prof = prof;
    while (k < n) begin
      @(posedge clk);
      if (btv_valid) k++;
    end
    repeat (2) @(posedge clk);
  endtask
  initial begin
    int id_a;
    btv_restart = 0;
    wait (rst_n);
    btv_run(0, 6);     // first phase A: stored after M intervals
    checks++;
    if (n_btv_new != 1 || btv_num_phases != 1) begin
      failures++; $display("FAIL: BTV phase A not stored (%0d new)", n_btv_new);
    end
    id_a = int'(btv_phase_id);
    btv_run(1, 6);     // phase B
    checks++;
    if (n_btv_new != 2 || int'(btv_phase_id) == id_a) begin
      failures++; $display("FAIL: BTV phase B not stored");
    end
    btv_run(0, 3);     // back to A: matched
    checks++;
    if (!(btv_last_match && int'(btv_phase_id) == id_a) || n_btv_new != 2) begin
      failures++; $display("FAIL: BTV return to phase A not matched");
    end
    btv_run(2, 1);     // one-interval glitch
    btv_run(0, 3);
    checks++;
    if (n_btv_unst != 1 || n_btv_new != 2) begin
      failures++; $display("FAIL: BTV glitch not discarded (%0d unstable)", n_btv_unst);
    end
    btv_done = 1;
  end

  // ---------------- two-mode OOO/InO core (own inputs)
  // Phase 0: memory-bound, IPC 0.1 with few hits, stores and mispredictions,
  // for which the regressions give InO the better IPS^2/Watt. Phase 1: IPC 1
  // with many L1 hits, for which OOO is better.
  int oi_phase = 0;
  always @(posedge clk) begin
    pmc_event_t e;
    e = '0;
    if (oi_phase == 0) begin
      e.commit     = 3'(($urandom % 10) == 0);
      e.l1_hit     = 3'(($urandom % 1000) < 2);
      e.br_misp    = 3'(($urandom % 10000) < 4);
      e.c_st       = 3'(($urandom % 1000) < 1);
      e.disp_stall = ($urandom % 100) == 0;
    end else begin
      e.commit     = 3'd1;
      e.l1_hit     = 3'(($urandom % 5) == 0);
      e.br_misp    = 3'(($urandom % 100) == 0);
      e.c_st       = 3'(($urandom % 10) == 0);
    end
    oi_ev <= e;
  end
  // flush acknowledged a few clocks after it is requested
  int oi_fl_cnt = 0;
  bit oi_flush_seen = 0;
  always @(posedge clk) begin
    oi_flushed <= 1'b0;
    if (!rst_n) oi_fl_cnt <= 0;
    else if (oi_flush_req && !oi_flushed) begin
      if (oi_fl_cnt >= 3 + int'($urandom % 8)) begin
        oi_flushed    <= 1'b1;
        oi_fl_cnt     <= 0;
        n_oi_flush++;
        oi_flush_seen = 1;
      end else oi_fl_cnt <= oi_fl_cnt + 1;
    end
  end
  logic [24:0] oi_en, oi_en_d;
  bit oi_en_ok = 0;
  assign oi_en = {oi_rob_en, oi_rat_en, oi_lsq_en, oi_fpisq_en, oi_fetch_en, oi_decode_en,
                  oi_issue_en, oi_int_alu_en, oi_fp_alu_en, oi_ls_unit_en};
  always @(posedge clk) if (rst_n) begin
    if (oi_en_ok) begin
      checks++;
      if ($countones(oi_en ^ oi_en_d) > 1) begin
        failures++; $display("FAIL: two-mode core gated two units in one clock");
      end
    end
    oi_en_d  <= oi_en;
    oi_en_ok <= 1;
    if (oi_win_valid) n_oi_win++;
    if (oi_rec_valid) n_oi_rec++;
    if (oi_dec_valid && !oi_dec_switch) n_oi_stay++;
    if (oi_rob_ptr_reset) n_oi_rptr++;
    if (oi_rob_ptr_reset && !(oi_mode_changed && oi_mode_ooo)) begin
      failures++; $display("FAIL: ROB pointer reset outside a return to OOO");
    end
    if (oi_mode_changed) begin
      checks++;
      if (oi_mode_ooo) begin
        n_oi_ooo++;
        if (!oi_rob_ptr_reset || oi_en != '1) begin
          failures++; $display("FAIL: return to OOO (rob_ptr_reset %b, enables %h)",
                               oi_rob_ptr_reset, oi_en);
        end
      end else begin
        n_oi_ino++;
        if (!oi_flush_seen ||
            oi_en != {4'b0000, 4'b0011, 4'b0011, 4'b0011, 4'b0011, 2'b01, 3'b001}) begin
          failures++; $display("FAIL: entry into InO (flushed %b, enables %h)",
                               oi_flush_seen, oi_en);
        end
      end
      oi_flush_seen = 0;
    end
  end
  task automatic oi_run(int ph, bit want_ooo);
    int k = 0;
    oi_phase = ph;
    while (oi_mode_ooo != want_ooo && k < 30) begin
      @(posedge clk);
      if (oi_win_valid) k++;
    end
    checks++;
    if (oi_mode_ooo != want_ooo) begin
      failures++; $display("FAIL: two-mode core did not reach %s", want_ooo ? "OOO" : "InO");
    end
  endtask
  initial begin
    int k;
    wait (rst_n);
    oi_run(0, 0);
    oi_run(1, 1);
    oi_run(0, 0);
    oi_run(1, 1);
    // an OOO-friendly phase while in OOO: decisions to stay
    k = 0;
    while (k < 12) begin
      @(posedge clk);
      if (oi_win_valid) k++;
    end
    checks++;
    if (!oi_mode_ooo || oi_switches != 32'd4) begin
      failures++; $display("FAIL: two-mode core left OOO in an OOO phase");
    end
    oi_done = 1;
  end

  task automatic wait_windows(int n);
    int k = 0;
    while (k < n) begin
      @(posedge clk);
      if (win_valid) k++;
    end
  endtask

  initial begin
    rpe_policy = 0;
    for (int m = 0; m < 4; m++) avf[m] = fx_t'(19661);   // 0.3
    cfg_we = 0; cfg_src = MODE_AC; cfg_expr = 0; cfg_term = 0; cfg_data = '0;
    phase_kind = 0; phase_mode = 0;
    for (int m = 0; m < 4; m++) p_ev[m] = 0.0;
    drained = 0; vrm_ready = 1; pll_locked = 1;
    for (int i = 0; i < ROB_BANKS; i++) rob_occ[i] = 0;
    for (int i = 0; i < LSQ_BANKS; i++) lsq_occ[i] = 0;
    for (int i = 0; i < IQ_BANKS; i++) iq_occ[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // load the regression table for every current mode
    for (int s = 0; s < 4; s++)
      for (int e = 0; e < 8; e++)
        for (int t = 0; t < 5; t++) begin
          term_t d;
          d = '{sel: PMC_ONE, coef: '0};
          if (e < 4) begin
            if (t == 0) d = '{sel: PMC_ONE, coef: fx_t'(int'(t_p[e] * 65536.0))};
            if (t == 1) d = '{sel: PMC_L1M, coef: fx_t'(7)};   // 1e-4 W per miss
          end else if (t == 0) d = '{sel: ipc_src(e - 4), coef: fx_t'(655)};   // 0.01
          @(posedge clk);
          cfg_we <= 1'b1; cfg_src <= mode_e'(s); cfg_expr <= 3'(e); cfg_term <= 3'(t);
          cfg_data <= d;
        end
    @(posedge clk);
    cfg_we <= 1'b0;
    for (int round = 0; round < 2; round++) begin
      int order [4] = '{1, 2, 3, 0};
      for (int k = 0; k < 4; k++) begin
        int m;
        m = order[(k + round) % 4];
        phase_kind = 0; phase_mode = m;
        for (int j = 0; j < 4; j++) p_ev[j] = (j == m) ? 0.5 : 0.0;
        wait_windows(12);
        checks++;
        if (int'(cur_mode) != m) begin
          failures++; $display("FAIL: dominant phase for mode %0d ended in mode %0d", m, cur_mode);
        end
      end
      phase_kind = 1;
      wait_windows(40);
    end
    // reliability-aware policy
    rpe_policy = 1;
    phase_kind = 0;
    for (int k = 0; k < 4; k++) begin
      int order [4] = '{2, 3, 1, 0};
      phase_mode = order[k];
      for (int j = 0; j < 4; j++) p_ev[j] = (j == order[k]) ? 0.5 : 0.0;
      wait_windows(12);
      checks++;
      if (int'(cur_mode) != order[k]) begin
        failures++; $display("FAIL: RPE dominant phase for mode %0d ended in mode %0d", order[k], cur_mode);
      end
    end
    // LW best by IPS^2/Watt, but sixteen times as vulnerable: never entered
    for (int m = 0; m < 4; m++) avf[m] = (m == 2) ? fx_t'(52429) : fx_t'(3277);   // 0.8 / 0.05
    for (int j = 0; j < 4; j++) p_ev[j] = (j == 2) ? 0.5 : 0.0;
    lw_banned = 1;
    wait_windows(12);
    lw_banned = 0;
    for (int m = 0; m < 4; m++) avf[m] = fx_t'(19661);
    wait_windows(12);
    checks++;
    if (cur_mode != MODE_LW) begin failures++; $display("FAIL: LW not reached with equal AVF"); end
    rpe_policy = 0;
    while (!btv_done || !oi_done) @(posedge clk);
    repeat (600) @(posedge clk);
    checks++;
    if (n_win == 0 || n_rec == 0 || n_dec == 0 || n_stay == 0 || n_sw == 0 ||
        visits[0] == 0 || visits[1] == 0 || visits[2] == 0 || visits[3] == 0 ||
        n_drain == 0 || n_bankwait == 0 || n_vfwait == 0 || n_hold == 0 || n_cfg == 0 ||
        n_rpe == 0 || n_rpe_sw == 0 || n_btv_new == 0 || n_btv_match == 0 || n_btv_unst == 0 ||
        n_oi_win == 0 || n_oi_rec == 0 || n_oi_stay == 0 || n_oi_ino == 0 || n_oi_ooo == 0 ||
        n_oi_flush == 0 || n_oi_rptr == 0) begin
      failures++;
      $display("FAIL: a mechanism never happened");
    end
    $display("windows=%0d recommendations=%0d decisions=%0d stay_decisions=%0d switches=%0d",
             n_win, n_rec, n_dec, n_stay, n_sw);
    $display("visits AC=%0d NC=%0d LW=%0d SM=%0d drains=%0d bank_wait_cycles=%0d vf_wait_cycles=%0d",
             visits[0], visits[1], visits[2], visits[3], n_drain, n_bankwait, n_vfwait);
    $display("threshold_holds=%0d cfg_writes=%0d model_skips=%0d last_overhead=%0d",
             n_hold, n_cfg, n_skip, last_overhead);
    $display("rpe_recommendations=%0d rpe_switch_recs=%0d btv_intervals=%0d btv_new=%0d btv_match=%0d btv_unstable=%0d",
             n_rpe, n_rpe_sw, n_btv, n_btv_new, n_btv_match, n_btv_unst);
    $display("two-mode: windows=%0d recommendations=%0d stay_decisions=%0d to_InO=%0d to_OOO=%0d flushes=%0d rob_ptr_resets=%0d",
             n_oi_win, n_oi_rec, n_oi_stay, n_oi_ino, n_oi_ooo, n_oi_flush, n_oi_rptr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
