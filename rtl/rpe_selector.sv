// rpe_selector: mode choice by reliability-power efficiency (RPE).
//
// In the reliability-aware variant the mode is not chosen by IPS^2/Watt alone
// but by the Cobb-Douglas combination
//   RPE = (IPS^2/Watt)^a x (Effective_SER)^-b,      a + b = 1,
//   Effective_SER = AVF x Raw_SER,
//   Raw_SER(f, v) = (f / fmax) x e^(-c0 (v - vmax)) x Raw_SER0,
// which rewards throughput per watt and penalises the soft-error rate: lower
// voltage raises the raw error rate, larger and fuller buffers raise the
// architectural vulnerability factor (AVF). Powers are awkward in hardware, so
// the block works with base-2 logarithms:
//   log2 RPE = a (2 log2(IPC f) - log2 P)
//            - b (log2 AVF + log2(f/fmax) + c0 log2(e) (vmax - v))
// (the constant Raw_SER0 and any normalisation cancel when modes are compared).
// It evaluates one logarithm per clock (four per mode) with a 16-segment
// piecewise-linear log2 unit, then recommends the mode with the largest
// log2 RPE if it exceeds the current mode's by log2(1 + threshold), otherwise
// the current mode.
//
// Interface: pulse `start` with `cur_mode` and per-mode estimates `ipc`, `pwr`
// and `avf` (Q16.16; they come from per-window counter regressions, e.g. the
// IPS^2/Watt estimator and an AVF regression), held stable until `done`.
// Timing: `done` is set 22 clocks after the clock that samples `start`
// (16 log clocks, 1 set-up, 4 compare, 1 output); `rec_mode` and `lrpe`
// (log2 RPE of every mode, Q16.16) are valid with it. Inputs below one LSB are
// treated as one LSB so that every logarithm is defined.
//
// Follows the published design: the RPE metric, Effective_SER = AVF x Raw_SER,
// the Raw_SER voltage/frequency model, a = 0.6, b = 0.4, the 4 % threshold and
// the mode table's frequencies and voltages. Own choices: the log-domain
// evaluation and its accuracy (about 1e-3 in log2), and the value of c0 (not
// given in the published design): C0_LOG2E_MV = c0 x log2(e) per mV, default
// 0.01 (the raw error rate doubles for every 100 mV of voltage reduction).
module rpe_selector
  import morph_pkg::*;
#(
  parameter fx_t A_W         = fx_t'(39322),   // a = 0.6
  parameter fx_t B_W         = fx_t'(26214),   // b = 0.4
  parameter fx_t LOG_THRESH  = fx_t'(3708),    // log2(1.04)
  parameter fx_t C0_LOG2E_MV = fx_t'(655),     // c0 log2(e) per mV = 0.01
  parameter fx_t IPC_MAX     = fx_t'(8 << 16)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  mode_e cur_mode,
  input  fx_t   ipc [NUM_MODES],
  input  fx_t   pwr [NUM_MODES],
  input  fx_t   avf [NUM_MODES],
  output logic  busy,
  output logic  done,
  output mode_e rec_mode,
  output fx_t   lrpe [NUM_MODES]
);
  // ---------------------------------------------------------------- log2
  // log2(1 + i/16) in Q16.16, i = 0..16
  function automatic logic [16:0] log_lut(logic [4:0] i);
    case (i)
      5'd0:  return 17'd0;
      5'd1:  return 17'd5732;
      5'd2:  return 17'd11136;
      5'd3:  return 17'd16248;
      5'd4:  return 17'd21098;
      5'd5:  return 17'd25711;
      5'd6:  return 17'd30109;
      5'd7:  return 17'd34312;
      5'd8:  return 17'd38336;
      5'd9:  return 17'd42196;
      5'd10: return 17'd45904;
      5'd11: return 17'd49472;
      5'd12: return 17'd52911;
      5'd13: return 17'd56229;
      5'd14: return 17'd59434;
      5'd15: return 17'd62534;
      default: return 17'd65536;
    endcase
  endfunction

  // log2 of a positive Q16.16 value (values below one LSB taken as one LSB)
  function automatic fx_t log2_fx(fx_t v);
    logic [31:0] u, nrm;
    int          p;
    logic [16:0] l0, l1;
    logic [28:0] interp;
    u = (v[31] || v == '0) ? 32'd1 : unsigned'(v);
    p = 0;
    for (int i = 0; i < 32; i++) if (u[i]) p = i;
    nrm = u << (31 - p);                        // leading one at bit 31
    l0  = log_lut({1'b0, nrm[30:27]});
    l1  = log_lut({1'b0, nrm[30:27]} + 5'd1);
    interp = 29'(l1 - l0) * 29'(nrm[26:15]);    // 12-bit position in segment
    return fx_t'((p - 16) <<< 16) + fx_t'(l0) + fx_t'(32'(interp >> 12));
  endfunction

  function automatic fx_t fx_mul(fx_t a, fx_t b);
    logic signed [63:0] pr;
    pr = 64'(a) * 64'(b);
    return fx_t'(pr >>> 16);
  endfunction

  localparam int unsigned FMAX_MHZ = 2000;   // highest frequency of the mode table
  localparam int unsigned VMAX_MV  = 1000;   // highest voltage of the mode table

  // ---------------------------------------------------------------- sequencing
  typedef enum logic [2:0] {S_IDLE, S_LOG, S_INIT, S_CMP, S_DONE} state_e;
  state_e state_q;
  logic [1:0] m_q, s_q;
  mode_e      cur_q;
  fx_t        acc_q [NUM_MODES];
  mode_e      best_q;
  fx_t        best_v_q;

  // operand of the current step and its weight in log2 RPE
  fx_t   ipc_c, opnd, wgt, lg, vterm;
  mode_e mm;
  assign mm    = mode_e'(m_q);
  assign ipc_c = (ipc[m_q] > IPC_MAX) ? IPC_MAX : ipc[m_q];
  always_comb begin
    unique case (s_q)
      2'd0: begin opnd = fx_mul(ipc_c, freq_ghz_fx(mm)); wgt = A_W <<< 1;  end
      2'd1: begin opnd = pwr[m_q];                       wgt = -A_W;       end
      2'd2: begin opnd = avf[m_q];                       wgt = -B_W;       end
      default: begin
        opnd = fx_t'((64'(mode_cfg(mm).freq_mhz) << 16) / 64'(FMAX_MHZ));
        wgt  = -B_W;
      end
    endcase
  end
  assign lg    = log2_fx(opnd);
  // voltage part of log2 Raw_SER, added with the last step of each mode
  assign vterm = fx_t'(int'(VMAX_MV) - int'(mode_cfg(mm).volt_mv)) * C0_LOG2E_MV;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      m_q      <= '0;
      s_q      <= '0;
      cur_q    <= MODE_AC;
      best_q   <= MODE_AC;
      best_v_q <= '0;
      done     <= 1'b0;
      rec_mode <= MODE_AC;
      for (int i = 0; i < NUM_MODES; i++) begin
        acc_q[i] <= '0;
        lrpe[i]  <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          cur_q <= cur_mode;
          m_q   <= '0;
          s_q   <= '0;
          for (int i = 0; i < NUM_MODES; i++) acc_q[i] <= '0;
          state_q <= S_LOG;
        end
        S_LOG: begin
          if (s_q == 2'd3) acc_q[m_q] <= acc_q[m_q] + fx_mul(wgt, lg + vterm);
          else             acc_q[m_q] <= acc_q[m_q] + fx_mul(wgt, lg);
          s_q <= s_q + 2'd1;
          if (s_q == 2'd3) begin
            m_q <= m_q + 2'd1;
            if (m_q == 2'd3) state_q <= S_INIT;
          end
        end
        S_INIT: begin
          best_q   <= cur_q;
          best_v_q <= acc_q[cur_q] + LOG_THRESH;
          m_q      <= '0;
          state_q  <= S_CMP;
        end
        S_CMP: begin
          if (mode_e'(m_q) != cur_q && acc_q[m_q] > best_v_q) begin
            best_q   <= mode_e'(m_q);
            best_v_q <= acc_q[m_q];
          end
          m_q <= m_q + 2'd1;
          if (m_q == 2'd3) state_q <= S_DONE;
        end
        S_DONE: begin
          rec_mode <= best_q;
          for (int i = 0; i < NUM_MODES; i++) lrpe[i] <= acc_q[i];
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);
endmodule
