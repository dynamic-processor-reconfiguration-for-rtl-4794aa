// ooo_ino_manager: morphing management of the two-mode out-of-order / in-order
// core.
//
// In this variant one 4-wide out-of-order (OOO) core can be turned into a
// 2-wide in-order (InO) core by powering off its out-of-order machinery. During
// phases with low ILP or many cache misses the InO mode gives more IPS^2/Watt;
// when that advantage is gone the core is turned back into OOO. After every
// window of committed instructions the counter vector `pmc` arrives (the
// window itself is counted outside, by pmc_counters) and this block
//   1. evaluates three linear expressions of the counters on one MAC
//      (mac_unit), five terms each: the IPC and the power of the other mode and
//      the power of the current mode (the IPC of the current mode is measured),
//   2. compares IPC^2/P of the two modes (both run at the same clock, so this
//      orders them like IPS^2/Watt) and votes for the other mode only if it is
//      better by THRESH,
//   3. after HISTORY_DEPTH windows, switches if more than half of the votes
//      were for the other mode (a tie keeps the current mode); the votes then
//      start afresh,
//   4. switches by changing the enables of the gated units, one unit per clock
//      (staggered power gating): going to InO the ROB, RAT, LSQ and FP issue
//      queue are switched off, fetch, decode, issue and integer ALUs go from 4
//      to 2, LS units from 3 to 1 and FP ALUs from 2 to 1; then the pipeline
//      is flushed (`flush_req` until `flushed`) and fetching restarts in InO.
//      Going back, the units are switched on one per clock and `rob_ptr_reset`
//      pulses so that ROB head and tail start at the same slot.
//
// Interface: `pmc_valid`/`pmc` from pmc_counters; `mode_ooo` tells the core
// which execution mode to use; `morphing` is high during a switch (counting
// should pause); `mode_changed` pulses when the switch has finished. `est_*`
// hold the last estimates. Timing: a window's estimate takes 15 MAC cycles plus
// 3, so `rec_valid` comes 19 clocks after `pmc_valid`; a switch takes one clock
// per unit whose enable changes (15 each way) plus the flush.
//
// Follows the published design: the two modes, the unit changes of the InO
// mode, the regression expressions and their coefficients (rounded to Q16.16),
// window length, history depth 6, threshold 4 %, most-frequent vote, staggered
// gating of one unit per clock, flushing and re-fetching when entering InO and
// resetting the ROB pointers when leaving it. Own choices: the Q16.16 format,
// the use of the threshold in both directions, a tie keeping the current mode,
// clamping a negative estimate to zero IPC or to one LSB of power, the order in
// which units are gated, and the handshakes.
module ooo_ino_manager
  import morph_pkg::*;
#(
  parameter int unsigned HISTORY_DEPTH = 6,
  parameter fx_t         THRESH        = fx_t'(2621)   // 4 % in Q16.16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pmc_valid,
  input  fx_t         pmc [NUM_PMC],
  // core control
  output logic        mode_ooo,
  output logic        morphing,
  output logic        mode_changed,
  output logic        flush_req,
  input  logic        flushed,
  output logic        rob_ptr_reset,
  output logic        rob_en,
  output logic        rat_en,
  output logic        lsq_en,
  output logic        fpisq_en,
  output logic [3:0]  fetch_en,
  output logic [3:0]  decode_en,
  output logic [3:0]  issue_en,
  output logic [3:0]  int_alu_en,
  output logic [1:0]  fp_alu_en,
  output logic [2:0]  ls_unit_en,
  // status
  output logic        rec_valid,
  output logic        rec_other,   // this window voted for the other mode
  output logic        dec_valid,
  output logic        dec_switch,
  output fx_t         est_ipc_other,
  output fx_t         est_pwr_other,
  output fx_t         est_pwr_cur,
  output logic [31:0] switches
);
  // ---------------------------------------------------------------- terms
  // expression e of the current mode: 0 IPC of the other mode, 1 power of the
  // other mode, 2 power of the current mode
  function automatic term_t oi_term(logic ooo, int unsigned e, int unsigned t);
    term_t z;
    z = '{sel: PMC_ONE, coef: '0};
    if (!ooo) begin        // counters measured in InO
      case (e)
        0: case (t)
             0: return '{sel: PMC_L1H, coef: fx_t'(295)};       // 4.5e-3
             1: return '{sel: PMC_IPC, coef: fx_t'(289473)};    // 4.417
             2: return '{sel: PMC_BMP, coef: fx_t'(-1789)};     // -0.0273
             3: return '{sel: PMC_ONE, coef: fx_t'(-152404)};   // -2.3255
             default: return z;
           endcase
        1: case (t)
             0: return '{sel: PMC_L1H, coef: fx_t'(5243)};      // 0.080
             1: return '{sel: PMC_IPC, coef: fx_t'(4662886)};   // 71.15
             2: return '{sel: PMC_BMP, coef: fx_t'(-26948)};    // -0.4112
             3: return '{sel: PMC_ONE, coef: fx_t'(-2520515)};  // -38.46
             default: return z;
           endcase
        default: case (t)
             0: return '{sel: PMC_L1H, coef: fx_t'(308)};       // 0.0047
             1: return '{sel: PMC_IPC, coef: fx_t'(856031)};    // 13.062
             2: return '{sel: PMC_ST,  coef: fx_t'(-452)};      // -0.0069
             3: return '{sel: PMC_DS,  coef: fx_t'(-5)};        // -7.4e-5
             4: return '{sel: PMC_ONE, coef: fx_t'(101889)};    // 1.5547
             default: return z;
           endcase
      endcase
    end else begin         // counters measured in OOO
      case (e)
        0: case (t)
             0: return '{sel: PMC_L1H, coef: fx_t'(-404)};      // -0.00616
             1: return '{sel: PMC_IPC, coef: fx_t'(4372)};      // 0.06671
             2: return '{sel: PMC_BMP, coef: fx_t'(-28)};       // -4.2e-4
             3: return '{sel: PMC_DS,  coef: fx_t'(-5)};        // -7.5e-5
             4: return '{sel: PMC_ONE, coef: fx_t'(18140)};     // 0.2768
             default: return z;
           endcase
        1: case (t)
             0: return '{sel: PMC_L1H, coef: fx_t'(-256)};      // -0.0039
             1: return '{sel: PMC_IPC, coef: fx_t'(59127)};     // 0.9022
             2: return '{sel: PMC_ST,  coef: fx_t'(682)};       // 0.0104
             3: return '{sel: PMC_BMP, coef: fx_t'(-675)};      // -0.0103
             4: return '{sel: PMC_ONE, coef: fx_t'(292743)};    // 4.4669
             default: return z;
           endcase
        default: case (t)
             0: return '{sel: PMC_L1H, coef: fx_t'(924)};       // 0.0141
             1: return '{sel: PMC_IPC, coef: fx_t'(905052)};    // 13.81
             2: return '{sel: PMC_ST,  coef: fx_t'(1933)};      // 0.0295
             3: return '{sel: PMC_BMP, coef: fx_t'(-773)};      // -0.0118
             4: return '{sel: PMC_ONE, coef: fx_t'(-19589)};    // -0.2989
             default: return z;
           endcase
      endcase
    end
  endfunction

  // ---------------------------------------------------------------- estimate
  typedef enum logic [1:0] {E_IDLE, E_FEED, E_WAIT, E_CMP} est_e;
  est_e        est_q;
  logic [3:0]  k_q;                 // term index 0..14
  fx_t         pmc_q [NUM_PMC];
  fx_t         ipc_cur_q;
  logic        m_valid, m_first, m_last, o_valid;
  logic [1:0]  m_tag, o_tag;
  fx_t         m_a, m_b, o_sum;
  term_t       trm;
  logic [1:0]  e_k;
  logic [2:0]  t_k;

  assign e_k     = 2'(k_q / 4'd5);
  assign t_k     = 3'(k_q % 4'd5);
  assign trm     = oi_term(mode_ooo, int'(e_k), int'(t_k));
  assign m_valid = (est_q == E_FEED);
  assign m_first = (t_k == 3'd0);
  assign m_last  = (t_k == 3'd4);
  assign m_tag   = e_k;
  assign m_a     = trm.coef;
  assign m_b     = pmc_q[trm.sel];

  mac_unit #(.TAG_W(2)) u_mac (
    .clk, .rst_n,
    .in_valid (m_valid), .in_first (m_first), .in_last (m_last), .in_tag (m_tag),
    .a (m_a), .b (m_b),
    .out_valid (o_valid), .out_tag (o_tag), .out_sum (o_sum)
  );

  // IPC^2/P of both modes, cross-multiplied:
  //   other wins if ipc_o^2 * p_c * 2^16 > ipc_c^2 * p_o * (2^16 + THRESH)
  logic [31:0]  ipc_o, ipc_c, p_o, p_c;
  logic [127:0] lhs, rhs;
  always_comb begin
    ipc_o = est_ipc_other[31] ? 32'd0 : 32'(est_ipc_other);
    ipc_c = ipc_cur_q[31]     ? 32'd0 : 32'(ipc_cur_q);
    p_o   = (est_pwr_other[31] || est_pwr_other == '0) ? 32'd1 : 32'(est_pwr_other);
    p_c   = (est_pwr_cur[31]   || est_pwr_cur   == '0) ? 32'd1 : 32'(est_pwr_cur);
    lhs   = ((128'(ipc_o) * 128'(ipc_o)) * 128'(p_c)) << FX_F;
    rhs   = (128'(ipc_c) * 128'(ipc_c)) * 128'(p_o) * (128'(1) << FX_F) +
            (128'(ipc_c) * 128'(ipc_c)) * 128'(p_o) * 128'(unsigned'(THRESH));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      est_q         <= E_IDLE;
      k_q           <= '0;
      ipc_cur_q     <= '0;
      est_ipc_other <= '0;
      est_pwr_other <= '0;
      est_pwr_cur   <= '0;
      rec_valid     <= 1'b0;
      rec_other     <= 1'b0;
      for (int i = 0; i < NUM_PMC; i++) pmc_q[i] <= '0;
    end else begin
      rec_valid <= 1'b0;
      if (o_valid) begin
        unique case (o_tag)
          2'd0:    est_ipc_other <= o_sum;
          2'd1:    est_pwr_other <= o_sum;
          default: est_pwr_cur   <= o_sum;
        endcase
      end
      unique case (est_q)
        E_IDLE: if (pmc_valid && !morphing) begin
          for (int i = 0; i < NUM_PMC; i++) pmc_q[i] <= pmc[i];
          ipc_cur_q <= pmc[PMC_IPC];
          k_q       <= '0;
          est_q     <= E_FEED;
        end
        E_FEED: begin
          k_q <= k_q + 4'd1;
          if (k_q == 4'd14) est_q <= E_WAIT;
        end
        E_WAIT: if (o_valid && o_tag == 2'd2) est_q <= E_CMP;
        E_CMP: begin
          rec_valid <= 1'b1;
          rec_other <= (lhs > rhs);
          est_q     <= E_IDLE;
        end
        default: est_q <= E_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- vote
  logic [3:0] n_rec_q, n_oth_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_rec_q    <= '0;
      n_oth_q    <= '0;
      dec_valid  <= 1'b0;
      dec_switch <= 1'b0;
    end else begin
      dec_valid <= 1'b0;
      if (mode_changed) begin
        n_rec_q <= '0;
        n_oth_q <= '0;
      end else if (rec_valid) begin
        if (n_rec_q == 4'(HISTORY_DEPTH - 1)) begin
          dec_valid  <= 1'b1;
          dec_switch <= 2 * (int'(n_oth_q) + int'(rec_other)) > int'(HISTORY_DEPTH);
          n_rec_q    <= '0;
          n_oth_q    <= '0;
        end else begin
          n_rec_q <= n_rec_q + 4'd1;
          n_oth_q <= n_oth_q + 4'(rec_other);
        end
      end
    end
  end

  // ---------------------------------------------------------------- morph
  // all gated units as one vector; the lowest differing bit changes first, so
  // LS units and ALUs are gated before the lanes and the ROB last
  localparam int unsigned NU = 25;
  localparam logic [NU-1:0] EN_OOO = '1;
  // bit order: rob, rat, lsq, fpisq, fetch[3:0], decode[3:0], issue[3:0],
  // int_alu[3:0], fp_alu[1:0], ls_unit[2:0]
  localparam logic [NU-1:0] EN_INO = {1'b0, 1'b0, 1'b0, 1'b0, 4'b0011, 4'b0011,
                                      4'b0011, 4'b0011, 2'b01, 3'b001};
  logic [NU-1:0] en_q, en_tgt, diff, first_diff;

  typedef enum logic [2:0] {M_RUN, M_GATE, M_FLUSH, M_RESUME} mst_e;
  mst_e mst_q;
  logic to_ooo_q;

  assign en_tgt     = to_ooo_q ? EN_OOO : EN_INO;
  assign diff       = en_q ^ en_tgt;
  assign first_diff = diff & (~diff + NU'(1));   // lowest differing unit

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mst_q         <= M_RUN;
      to_ooo_q      <= 1'b1;
      mode_ooo      <= 1'b1;
      en_q          <= EN_OOO;
      mode_changed  <= 1'b0;
      rob_ptr_reset <= 1'b0;
      switches      <= '0;
    end else begin
      mode_changed  <= 1'b0;
      rob_ptr_reset <= 1'b0;
      unique case (mst_q)
        M_RUN: if (dec_valid && dec_switch) begin
          to_ooo_q <= !mode_ooo;
          mst_q    <= M_GATE;
        end
        M_GATE: begin
          if (diff != '0) en_q <= en_q ^ first_diff;
          else mst_q <= to_ooo_q ? M_RESUME : M_FLUSH;
        end
        M_FLUSH: if (flushed) mst_q <= M_RESUME;
        M_RESUME: begin
          mode_ooo      <= to_ooo_q;
          rob_ptr_reset <= to_ooo_q;
          mode_changed  <= 1'b1;
          switches      <= switches + 32'd1;
          mst_q         <= M_RUN;
        end
        default: mst_q <= M_RUN;
      endcase
    end
  end

  assign morphing  = (mst_q != M_RUN);
  assign flush_req = (mst_q == M_FLUSH);
  assign {rob_en, rat_en, lsq_en, fpisq_en, fetch_en, decode_en, issue_en,
          int_alu_en, fp_alu_en, ls_unit_en} = en_q;

  // staggered gating: at most one unit changes per clock
  a_one_unit: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(en_q ^ $past(en_q)));

endmodule
