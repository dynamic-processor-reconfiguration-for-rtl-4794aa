// btv_phase_detector: program phase detection with a bottleneck type vector.
//
// This is the phase detector of the asymmetric multi-core variant, in which a
// thread is moved between cores of different types only when it enters a
// stable new program phase. Over each interval of INTERVAL_LEN committed
// instructions it counts the cycles lost to each kind of bottleneck: I-cache,
// D-cache and L2 stalls, branch-mispredict stalls, resource stalls (dispatch
// blocked by a full IQ/ROB/LSQ) and width stalls (ready instructions left
// waiting by a narrow issue), plus the committed instructions. At the end of the
// interval each count is divided by the interval's cycles, giving the 7-entry
// bottleneck type vector (BTV; the last entry is the IPC). The BTV is then
// compared with the stored stable phases by the sum of absolute differences
// (SAD) of the entries:
//   - the nearest stored phase within THRESH is the matching phase (`match`);
//   - otherwise the interval starts a potential new phase; the next M-1
//     intervals are compared too, and if the majority of these M intervals are
//     further than THRESH from every stored phase, a new phase is stored
//     (`new_phase`), else the potential phase is dropped as unstable
//     (`unstable`).
// A new phase is the point at which the best core type is re-evaluated.
//
// Interface: per-cycle `commit` count and `stall` bits {width, resource,
// branch, L2, D-cache, I-cache}. `restart` (after a thread migration) clears the
// current interval and any potential phase and keeps the stored phases. One
// result pulse (`btv_valid`, together with exactly one of `match`, `new_phase`,
// `unstable` or neither while a potential phase is still being watched) follows
// every interval after 7 divisions (W+FRAC+2 clocks each) and 7 clocks per
// stored phase. INTERVAL_LEN must span more clocks than that.
//
// Follows the published design: the BTV components, normalisation by cycles,
// sum of absolute differences, phase threshold 8.5 %, m = 4, 50K-instruction
// intervals and the majority rule. Own choices: the SAD is over fractions of
// cycles (0.085 absolute), the IPC is an entry as is, NUM_PHASES stored phases
// replaced round-robin, the stored vector of a new phase is that of its last
// far interval, and the counting of M includes the first potential interval.
module btv_phase_detector
  import morph_pkg::*;
#(
  parameter int unsigned INTERVAL_LEN = 50000,
  parameter fx_t         THRESH       = fx_t'(5571),   // 0.085 in Q16.16
  parameter int unsigned M            = 4,
  parameter int unsigned NUM_PHASES   = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        restart,
  input  logic [2:0]  commit,
  input  logic [5:0]  stall,
  output logic        busy,
  output logic        btv_valid,
  output fx_t         btv [7],
  output logic        match,
  output logic        new_phase,
  output logic        unstable,
  output logic        phase_known,
  output logic [$clog2(NUM_PHASES)-1:0] phase_id,
  output fx_t         min_sad,
  output logic [$clog2(NUM_PHASES+1)-1:0] num_phases
);
  localparam int unsigned NB = 7;
  localparam int unsigned PW = $clog2(NUM_PHASES);
  localparam int unsigned MW = $clog2(M + 1);

  // ---------------------------------------------------------------- counting
  logic [31:0] cnt_q [NB];
  logic [31:0] cyc_q, ins_q;
  logic [31:0] snap_q [NB];
  logic [31:0] snap_cyc_q;
  logic        close;
  assign close = (ins_q + 32'(commit)) >= 32'(INTERVAL_LEN);

  function automatic logic [31:0] sat_inc(logic [31:0] v, logic [31:0] d);
    logic [32:0] s;
    s = {1'b0, v} + {1'b0, d};
    return s[32] ? '1 : s[31:0];
  endfunction

  // ---------------------------------------------------------------- divider
  logic        div_start, div_busy, div_done;
  logic [31:0] div_quo;
  logic [2:0]  k_q;
  seq_div #(.W(32), .FRAC(16)) u_div (
    .clk, .rst_n, .start(div_start), .num(snap_q[k_q]), .den(snap_cyc_q),
    .busy(div_busy), .done(div_done), .quo(div_quo));

  // ---------------------------------------------------------------- phases
  fx_t         tab_q [NUM_PHASES][NB];
  logic [NUM_PHASES-1:0] tab_v_q;
  logic [PW-1:0] repl_q;
  logic [PW-1:0] p_q, best_p_q;
  fx_t         sad_q, best_sad_q;
  logic        best_ok_q;

  logic        cand_q;
  logic [MW-1:0] cand_n_q, cand_far_q;
  fx_t         cand_btv_q [NB];

  typedef enum logic [2:0] {S_IDLE, S_DIV, S_SAD, S_DECIDE} state_e;
  state_e state_q;

  fx_t diff, adiff;
  assign diff  = btv[k_q] - tab_q[p_q][k_q];
  assign adiff = diff[31] ? -diff : diff;

  logic far;
  assign far = !best_ok_q || (best_sad_q > THRESH);

  // far intervals of the potential phase, including the one being decided
  logic [MW-1:0] n_far;
  assign n_far = cand_far_q + MW'(far);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NB; i++) begin
        cnt_q[i]      <= '0;
        snap_q[i]     <= '0;
        btv[i]        <= '0;
        cand_btv_q[i] <= '0;
      end
      for (int p = 0; p < NUM_PHASES; p++)
        for (int i = 0; i < NB; i++) tab_q[p][i] <= '0;
      cyc_q <= '0; ins_q <= '0; snap_cyc_q <= '0;
      tab_v_q <= '0; repl_q <= '0;
      p_q <= '0; best_p_q <= '0; sad_q <= '0; best_sad_q <= '0; best_ok_q <= 1'b0;
      cand_q <= 1'b0; cand_n_q <= '0; cand_far_q <= '0;
      state_q <= S_IDLE; k_q <= '0; div_start <= 1'b0;
      btv_valid <= 1'b0; match <= 1'b0; new_phase <= 1'b0; unstable <= 1'b0;
      phase_known <= 1'b0; phase_id <= '0; min_sad <= '0; num_phases <= '0;
    end else begin
      div_start <= 1'b0;
      btv_valid <= 1'b0;
      match     <= 1'b0;
      new_phase <= 1'b0;
      unstable  <= 1'b0;
      // counters
      if (restart) begin
        for (int i = 0; i < NB; i++) cnt_q[i] <= '0;
        cyc_q <= '0;
        ins_q <= '0;
      end else if (close) begin
        for (int i = 0; i < NB - 1; i++) begin
          snap_q[i] <= sat_inc(cnt_q[i], 32'(stall[i]));
          cnt_q[i]  <= '0;
        end
        snap_q[NB-1] <= sat_inc(cnt_q[NB-1], 32'(commit));
        cnt_q[NB-1]  <= '0;
        snap_cyc_q   <= sat_inc(cyc_q, 32'd1);
        cyc_q        <= '0;
        ins_q        <= '0;
      end else begin
        for (int i = 0; i < NB - 1; i++) cnt_q[i] <= sat_inc(cnt_q[i], 32'(stall[i]));
        cnt_q[NB-1] <= sat_inc(cnt_q[NB-1], 32'(commit));
        cyc_q       <= sat_inc(cyc_q, 32'd1);
        ins_q       <= ins_q + 32'(commit);
      end
      // evaluation
      if (restart) begin
        state_q    <= S_IDLE;
        cand_q     <= 1'b0;
        cand_n_q   <= '0;
        cand_far_q <= '0;
      end else unique case (state_q)
        S_IDLE: if (close) begin
          k_q       <= '0;
          div_start <= 1'b1;
          state_q   <= S_DIV;
        end
        S_DIV: if (div_done) begin
          btv[k_q] <= fx_t'(div_quo);
          if (k_q == 3'(NB - 1)) begin
            k_q        <= '0;
            p_q        <= '0;
            sad_q      <= '0;
            best_ok_q  <= 1'b0;
            best_sad_q <= '1;
            state_q    <= S_SAD;
          end else begin
            k_q       <= k_q + 3'd1;
            div_start <= 1'b1;
          end
        end
        S_SAD: begin
          // one |difference| per clock over every valid stored phase
          if (tab_v_q[p_q]) begin
            if (k_q == 3'(NB - 1)) begin
              if (!best_ok_q || (sad_q + adiff) < best_sad_q) begin
                best_ok_q  <= 1'b1;
                best_sad_q <= sad_q + adiff;
                best_p_q   <= p_q;
              end
              sad_q <= '0;
              k_q   <= '0;
            end else begin
              sad_q <= sad_q + adiff;
              k_q   <= k_q + 3'd1;
            end
          end
          if (!tab_v_q[p_q] || k_q == 3'(NB - 1)) begin
            if (p_q == PW'(NUM_PHASES - 1)) state_q <= S_DECIDE;
            else p_q <= p_q + 1'b1;
          end
        end
        S_DECIDE: begin
          btv_valid <= 1'b1;
          min_sad   <= best_ok_q ? best_sad_q : '1;
          state_q   <= S_IDLE;
          if (!cand_q) begin
            if (far) begin
              cand_q     <= 1'b1;
              cand_n_q   <= MW'(1);
              cand_far_q <= MW'(1);
              for (int i = 0; i < NB; i++) cand_btv_q[i] <= btv[i];
              if (M == 1) begin
                // a single interval suffices
                cand_q <= 1'b0;
                for (int i = 0; i < NB; i++) tab_q[repl_q][i] <= btv[i];
                tab_v_q[repl_q] <= 1'b1;
                phase_id    <= repl_q;
                phase_known <= 1'b1;
                new_phase   <= 1'b1;
                repl_q      <= (repl_q == PW'(NUM_PHASES - 1)) ? '0 : repl_q + 1'b1;
                if (!tab_v_q[repl_q]) num_phases <= num_phases + 1'b1;
              end
            end else begin
              match       <= 1'b1;
              phase_id    <= best_p_q;
              phase_known <= 1'b1;
            end
          end else begin
            if (far) for (int i = 0; i < NB; i++) cand_btv_q[i] <= btv[i];
            if (cand_n_q == MW'(M - 1)) begin
              cand_q     <= 1'b0;
              cand_n_q   <= '0;
              cand_far_q <= '0;
              if (2 * int'(n_far) > int'(M)) begin
                for (int i = 0; i < NB; i++) tab_q[repl_q][i] <= far ? btv[i] : cand_btv_q[i];
                tab_v_q[repl_q] <= 1'b1;
                phase_id    <= repl_q;
                phase_known <= 1'b1;
                new_phase   <= 1'b1;
                repl_q      <= (repl_q == PW'(NUM_PHASES - 1)) ? '0 : repl_q + 1'b1;
                if (!tab_v_q[repl_q]) num_phases <= num_phases + 1'b1;
              end else begin
                unstable <= 1'b1;
                if (!far) phase_id <= best_p_q;
              end
            end else begin
              cand_n_q   <= cand_n_q + 1'b1;
              cand_far_q <= n_far;
            end
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);

  // the previous interval has been classified before the next one closes
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (close && !restart) |-> (state_q == S_IDLE));
endmodule
