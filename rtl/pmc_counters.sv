// pmc_counters: performance monitoring counters sampled once per window.
//
// The morphing decision is driven by a small set of hardware event counters
// that are read after every "window" of committed instructions (500 in the
// published design). This block accumulates the core's per-cycle event reports
// (cache hits and misses, branch mispredictions, committed instruction types,
// fetched instructions, dispatch stalls on a full buffer) together with the
// cycle and committed-instruction counts. When the committed count reaches
// WINDOW_LEN the totals are frozen, the counters restart from zero, and a
// sequential divider computes IPC = instructions / cycles. The result is
// presented as a vector of Q16.16 values, one per PMC, with a one-cycle
// `pmc_valid` pulse.
//
// Follows the published design: the list of counters and the window of 500
// committed instructions. Own choices: counters hold raw counts per window (the
// regression coefficients absorb the scale), the instructions that overshoot
// WINDOW_LEN in the closing cycle belong to the closing window, counts saturate
// at 32767 when converted to Q16.16, and `pmc_valid` rises 49 clocks after the
// window's closing clock (one to start the divider, 48 divider steps). A window of WINDOW_LEN instructions always lasts
// longer than the divider (at most 7 commits per cycle), so no window is lost.
module pmc_counters
  import morph_pkg::*;
#(
  parameter int unsigned WINDOW_LEN = 500,
  parameter int unsigned CNT_W      = 24
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,      // low while the core drains/morphs
  input  pmc_event_t ev,
  output logic       pmc_valid,   // one-cycle pulse: pmc is a new window
  output fx_t        pmc [NUM_PMC],
  output logic [31:0] win_cycles, // cycles of the last window
  output logic [15:0] win_instr   // committed instructions of the last window
);
  localparam int unsigned NEV = 12;   // event counters (all PMCs but IPC and ONE)

  logic [CNT_W-1:0] cnt_q  [NEV];
  logic [CNT_W-1:0] snap_q [NEV];
  logic [CNT_W-1:0] inc    [NEV];
  logic [31:0]      cyc_q;
  logic [15:0]      ins_q;
  logic [15:0]      ins_next;
  logic             win_end;

  // Counter order in cnt_q: PMC index minus one (L1H .. DS).
  always_comb begin
    inc[0]  = CNT_W'(ev.l1_hit);
    inc[1]  = CNT_W'(ev.l1_miss);
    inc[2]  = CNT_W'(ev.l2_hit);
    inc[3]  = CNT_W'(ev.l2_miss);
    inc[4]  = CNT_W'(ev.br_misp);
    inc[5]  = CNT_W'(ev.c_int);
    inc[6]  = CNT_W'(ev.c_fp);
    inc[7]  = CNT_W'(ev.c_ld);
    inc[8]  = CNT_W'(ev.c_st);
    inc[9]  = CNT_W'(ev.c_br);
    inc[10] = CNT_W'(ev.fetched);
    inc[11] = CNT_W'(ev.disp_stall);
  end

  assign ins_next = ins_q + 16'(ev.commit);
  assign win_end  = enable && (ins_next >= 16'(WINDOW_LEN));

  logic        div_start, div_busy, div_done;
  logic [31:0] div_quo;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NEV; i++) begin
        cnt_q[i]  <= '0;
        snap_q[i] <= '0;
      end
      cyc_q      <= '0;
      ins_q      <= '0;
      win_cycles <= '0;
      win_instr  <= '0;
      div_start  <= 1'b0;
    end else begin
      div_start <= 1'b0;
      if (enable) begin
        if (win_end) begin
          for (int i = 0; i < NEV; i++) begin
            snap_q[i] <= cnt_q[i] + inc[i];
            cnt_q[i]  <= '0;
          end
          win_cycles <= cyc_q + 32'd1;
          win_instr  <= ins_next;
          cyc_q      <= '0;
          ins_q      <= '0;
          div_start  <= 1'b1;
        end else begin
          for (int i = 0; i < NEV; i++)
            if (cnt_q[i] != '1) cnt_q[i] <= cnt_q[i] + inc[i];
          if (cyc_q != '1) cyc_q <= cyc_q + 32'd1;
          ins_q <= ins_next;
        end
      end
    end
  end

  seq_div #(.W(32), .FRAC(FX_F)) u_ipc_div (
    .clk   (clk),
    .rst_n (rst_n),
    .start (div_start),
    .num   (32'(win_instr)),
    .den   (win_cycles),
    .busy  (div_busy),
    .done  (div_done),
    .quo   (div_quo)
  );

  function automatic fx_t sat_fx(logic [CNT_W-1:0] c);
    return (c > CNT_W'(32767)) ? fx_t'(32'h7FFF_0000) : fx_t'(32'(c) << FX_F);
  endfunction

  always_comb begin
    pmc[PMC_IPC] = div_quo[31] ? fx_t'(32'h7FFF_FFFF) : fx_t'(div_quo);
    for (int i = 0; i < NEV; i++) pmc[i+1] = sat_fx(snap_q[i]);
    pmc[PMC_ONE] = FX_ONE;
  end

  assign pmc_valid = div_done;

endmodule
