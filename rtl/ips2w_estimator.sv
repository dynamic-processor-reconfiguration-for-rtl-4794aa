// ips2w_estimator: per-window IPS^2/Watt estimate of every core mode and the
// resulting mode recommendation.
//
// While the core runs in one mode, only that mode's counters can be read, yet
// the decision needs power and performance of all four modes. A linear
// regression over a few counters gives each of them: for the current mode its
// power, for each other mode its power and its IPC (seven expressions; the
// current IPC is measured). This block evaluates those expressions term by term
// on a pipelined MAC unit, one term per cycle, then forms
//   IPS^2/Watt = (IPC x f)^2 / P
// for every mode using the mode's known frequency, and recommends the mode with
// the largest value, but only if it beats the current mode by THRESH (5 %);
// otherwise it recommends staying. Divisions are avoided by cross-multiplying:
// mode m beats the best so far when N_m * P_best > N_best * P_m.
//
// Interface: pulse `start` with `cur_mode` and the window's `pmc` vector while
// `busy` is low. `done` pulses with `rec_mode` and the estimates. Timing: 35
// MAC issue cycles (7 expressions x 5 terms), 4 cycles to drain the MAC and
// collect the last sum, 4 metric cycles, 1 set-up and 4 compare cycles and one
// output cycle: `done` is set 49 clocks after the clock that samples `start`.
// The coefficient table is held per current mode and can be rewritten through
// the `cfg_*` port; it resets to the published fit for the average-core mode
// (the fits for the other current modes were not published, so every row
// starts from the same fit until software loads its own).
//
// Follows the published design: the regression form, the seven expressions,
// one MAC per cycle, IPS^2/Watt as metric and the 5 % threshold. Own choices:
// Q16.16 arithmetic, five terms per expression (four counters and a
// constant), clamping of IPC to [0, IPC_MAX] and power to at least P_MIN.
module ips2w_estimator
  import morph_pkg::*;
#(
  parameter fx_t THRESH  = fx_t'(3277),     // 0.05 in Q16.16
  parameter fx_t P_MIN   = fx_t'(655),      // 0.01 W
  parameter fx_t IPC_MAX = fx_t'(8 << 16)   // 8 instructions per cycle
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  mode_e       cur_mode,
  input  fx_t         pmc [NUM_PMC],
  // coefficient table write port
  input  logic        cfg_we,
  input  mode_e       cfg_src,
  input  logic [2:0]  cfg_expr,
  input  logic [2:0]  cfg_term,
  input  term_t       cfg_data,
  // results
  output logic        busy,
  output logic        done,
  output mode_e       rec_mode,
  output fx_t         est_ipc [NUM_MODES],
  output fx_t         est_pwr [NUM_MODES],
  output logic [7:0]  mac_ops     // MAC operations used by the last estimate
);
  term_t coef_q [NUM_MODES][NUM_EXPR][NUM_TERMS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NUM_MODES; s++)
        for (int e = 0; e < NUM_EXPR; e++)
          for (int k = 0; k < NUM_TERMS; k++)
            coef_q[s][e][k] <= default_term(e, k);
    end else if (cfg_we && !busy) begin
      coef_q[cfg_src][cfg_expr][cfg_term] <= cfg_data;
    end
  end

  // ------------------------------------------------------------ sequencer
  typedef enum logic [2:0] {S_IDLE, S_ISSUE, S_WAIT, S_METRIC, S_INIT, S_CMP, S_DONE} state_e;
  state_e state_q;

  mode_e       cur_q;
  fx_t         pmc_q [NUM_PMC];
  logic [2:0]  e_q, t_q;
  logic [2:0]  got_q;          // expression results received
  logic [1:0]  m_q;            // mode index for metric/compare
  logic [7:0]  ops_q;

  fx_t         ipc_q [NUM_MODES];
  fx_t         pwr_q [NUM_MODES];
  logic [63:0] num_q [NUM_MODES];   // (IPC x f)^2, Q16.16
  mode_e       best_q;
  logic [63:0] best_n_q, best_p_q;

  // MAC interface
  logic        mac_in_valid, mac_first, mac_last;
  logic [2:0]  mac_tag;
  fx_t         mac_a, mac_b;
  logic        mac_out_valid;
  logic [2:0]  mac_out_tag;
  fx_t         mac_out_sum;

  term_t cur_term;
  assign cur_term = coef_q[cur_q][e_q][t_q];

  // expression slot to skip: the measured IPC of the current mode
  logic [2:0] skip_e;
  assign skip_e = 3'(NUM_MODES) + 3'(cur_q);

  always_comb begin
    mac_in_valid = (state_q == S_ISSUE);
    mac_first    = (t_q == 3'd0);
    mac_last     = (t_q == 3'(NUM_TERMS - 1));
    mac_tag      = e_q;
    mac_a        = cur_term.coef;
    mac_b        = pmc_q[cur_term.sel];
  end

  mac_unit #(.TAG_W(3)) u_mac (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (mac_in_valid),
    .in_first  (mac_first),
    .in_last   (mac_last),
    .in_tag    (mac_tag),
    .a         (mac_a),
    .b         (mac_b),
    .out_valid (mac_out_valid),
    .out_tag   (mac_out_tag),
    .out_sum   (mac_out_sum)
  );

  // metric of mode m_q: (clamped IPC x f)^2
  logic [63:0] ips_fx, num_fx;
  fx_t         ipc_c;
  always_comb begin
    ipc_c  = (ipc_q[m_q] < 0) ? '0 : (ipc_q[m_q] > IPC_MAX) ? IPC_MAX : ipc_q[m_q];
    ips_fx = (64'(unsigned'(ipc_c)) * 64'(unsigned'(freq_ghz_fx(mode_e'(m_q))))) >> FX_F;
    num_fx = (ips_fx * ips_fx) >> FX_F;
  end

  function automatic logic [63:0] pclamp(fx_t p);
    return (p < P_MIN) ? 64'(unsigned'(P_MIN)) : 64'(unsigned'(p));
  endfunction

  logic [63:0] lhs, rhs;
  always_comb begin
    lhs = num_q[m_q] * best_p_q;          // N_m * P_best
    rhs = best_n_q * pclamp(pwr_q[m_q]);  // N_best * P_m
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      cur_q    <= MODE_AC;
      e_q      <= '0;
      t_q      <= '0;
      got_q    <= '0;
      m_q      <= '0;
      ops_q    <= '0;
      mac_ops  <= '0;
      best_q   <= MODE_AC;
      best_n_q <= '0;
      best_p_q <= '0;
      rec_mode <= MODE_AC;
      done     <= 1'b0;
      for (int i = 0; i < NUM_PMC; i++) pmc_q[i] <= '0;
      for (int i = 0; i < NUM_MODES; i++) begin
        ipc_q[i] <= '0;
        pwr_q[i] <= '0;
        num_q[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (mac_out_valid) begin
        got_q <= got_q + 3'd1;
        if (mac_out_tag < 3'(NUM_MODES)) pwr_q[mac_out_tag[1:0]] <= mac_out_sum;
        else                             ipc_q[mac_out_tag[1:0]] <= mac_out_sum;
      end
      unique case (state_q)
        S_IDLE: if (start) begin
          cur_q  <= cur_mode;
          for (int i = 0; i < NUM_PMC; i++) pmc_q[i] <= pmc[i];
          e_q    <= '0;
          t_q    <= '0;
          got_q  <= '0;
          ops_q  <= '0;
          state_q <= S_ISSUE;
        end
        S_ISSUE: begin
          ops_q <= ops_q + 8'd1;
          if (t_q == 3'(NUM_TERMS - 1)) begin
            t_q <= '0;
            if (e_q == 3'(NUM_EXPR - 1) ||
                (e_q == 3'(NUM_EXPR - 2) && skip_e == 3'(NUM_EXPR - 1)))
              state_q <= S_WAIT;
            // next expression, stepping over the measured one
            e_q <= (e_q + 3'd1 == skip_e) ? e_q + 3'd2 : e_q + 3'd1;
          end else begin
            t_q <= t_q + 3'd1;
          end
        end
        S_WAIT: begin
          // the current mode's IPC is the measured one
          ipc_q[cur_q] <= pmc_q[PMC_IPC];
          if (got_q == 3'(NUM_EXPR - 1)) begin
            m_q     <= '0;
            state_q <= S_METRIC;
          end
        end
        S_METRIC: begin
          num_q[m_q] <= num_fx;
          if (m_q == 2'(NUM_MODES - 1)) begin
            m_q     <= '0;
            state_q <= S_INIT;
          end else begin
            m_q <= m_q + 2'd1;
          end
        end
        S_INIT: begin
          // the current mode, raised by the threshold, is the initial best
          best_q   <= cur_q;
          best_n_q <= num_q[cur_q] + ((num_q[cur_q] * 64'(unsigned'(THRESH))) >> FX_F);
          best_p_q <= pclamp(pwr_q[cur_q]);
          m_q      <= '0;
          state_q  <= S_CMP;
        end
        S_CMP: begin
          if (mode_e'(m_q) != cur_q && lhs > rhs) begin
            best_q   <= mode_e'(m_q);
            best_n_q <= num_q[m_q];
            best_p_q <= pclamp(pwr_q[m_q]);
          end
          if (m_q == 2'(NUM_MODES - 1)) state_q <= S_DONE;
          m_q <= m_q + 2'd1;
        end
        S_DONE: begin
          rec_mode <= best_q;
          mac_ops  <= ops_q;
          done     <= 1'b1;
          state_q  <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int i = 0; i < NUM_MODES; i++) begin
      est_ipc[i] = ipc_q[i];
      est_pwr[i] = pwr_q[i];
    end
  end

  assign busy = (state_q != S_IDLE);

endmodule
