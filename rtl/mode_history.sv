// mode_history: turns per-window recommendations into a switching decision.
//
// A recommendation is produced after every window, but switching on each one
// would chase transient behaviour. This block collects HISTORY_DEPTH
// consecutive recommendations (4 windows of 500 instructions, so one decision
// per 2000 committed instructions in the published design), counts how often
// each mode was recommended and, after the last of them, emits the most
// frequent one as `dec_mode` with a one-cycle `dec_valid`. The history then
// starts afresh.
//
// Interface: `rec_valid`/`rec_mode` from the estimator; `cur_mode` is the mode
// the core runs in; `flush` empties the history (used when the core changes
// mode so that a decision only uses windows measured in that mode).
// Timing: `dec_valid` is registered, one cycle after the deciding `rec_valid`.
//
// Follows the published design: history depth, most-frequent vote, one decision
// every depth x window instructions. Own choices: a tie is resolved in favour of
// the current mode when it is among the most frequent, otherwise in favour of
// the lowest-numbered mode; and the flush on a mode change.
module mode_history
  import morph_pkg::*;
#(
  parameter int unsigned HISTORY_DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  flush,
  input  mode_e cur_mode,
  input  logic  rec_valid,
  input  mode_e rec_mode,
  output logic  dec_valid,
  output mode_e dec_mode
);
  localparam int unsigned CW = $clog2(HISTORY_DEPTH + 1);

  logic [CW-1:0] votes_q [NUM_MODES];
  logic [CW-1:0] n_q;

  // votes including the arriving recommendation
  logic [CW-1:0] votes_n [NUM_MODES];
  mode_e         winner;
  logic [CW-1:0] best_v;

  always_comb begin
    for (int m = 0; m < NUM_MODES; m++)
      votes_n[m] = votes_q[m] + CW'(rec_mode == mode_e'(m));
    winner = cur_mode;
    best_v = votes_n[cur_mode];
    for (int m = 0; m < NUM_MODES; m++)
      if (votes_n[m] > best_v) begin
        best_v = votes_n[m];
        winner = mode_e'(m);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < NUM_MODES; m++) votes_q[m] <= '0;
      n_q       <= '0;
      dec_valid <= 1'b0;
      dec_mode  <= MODE_AC;
    end else begin
      dec_valid <= 1'b0;
      if (flush) begin
        for (int m = 0; m < NUM_MODES; m++) votes_q[m] <= '0;
        n_q <= '0;
      end else if (rec_valid) begin
        if (n_q == CW'(HISTORY_DEPTH - 1)) begin
          dec_valid <= 1'b1;
          dec_mode  <= winner;
          for (int m = 0; m < NUM_MODES; m++) votes_q[m] <= '0;
          n_q <= '0;
        end else begin
          for (int m = 0; m < NUM_MODES; m++) votes_q[m] <= votes_n[m];
          n_q <= n_q + 1'b1;
        end
      end
    end
  end
endmodule
