// bank_group_ctrl: power state of the banks (or lanes) of one resizable unit.
//
// The ROB, LSQ and IQ of the morphable core are stacks of equal banks, each
// with its own drivers, precharge and sense amplifiers, that can be powered on
// or off; fetch, decode and issue lanes are switched the same way. Given the
// number of banks the new mode needs (`target`), this block proposes one bank
// change at a time and applies it only when `grant` is high, so a central
// arbiter can keep to one power-gating action per clock across the whole core.
//   - Too few banks on: the lowest-numbered powered-off bank is switched on.
//   - Too many banks on: the powered-on bank holding the fewest used entries
//     (`occ`) is chosen; it is switched off only once it is empty, otherwise
//     the block waits (`want` stays low) for its entries to drain.
// `en` is the bank enable vector (part of the configuration control register);
// `at_target` says the enabled count equals `target`. Lanes are given `occ` = 0.
//
// Follows the published design: independent banks, one bank gated per cycle,
// least-occupied bank chosen, wait until it is empty. Own choices: powering on
// the lowest-numbered free bank, the grant handshake, reset state (RESET_ON
// banks on, as in the baseline mode).
module bank_group_ctrl #(
  parameter int unsigned N        = 16,
  parameter int unsigned OCC_W    = 5,
  parameter int unsigned RESET_ON = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [$clog2(N+1)-1:0] target,
  input  logic [OCC_W-1:0]       occ [N],
  input  logic                   grant,
  output logic                   want,
  output logic [N-1:0]           en,
  output logic                   at_target
);
  localparam int unsigned CW = $clog2(N + 1);
  localparam int unsigned IW = $clog2(N);

  logic [CW-1:0]        on_cnt;
  logic [IW-1:0]        on_idx, off_idx;
  logic                 on_found, off_found;
  logic [OCC_W-1:0]     off_occ;

  always_comb begin
    on_cnt    = '0;
    on_idx    = '0;
    on_found  = 1'b0;
    off_idx   = '0;
    off_found = 1'b0;
    off_occ   = '1;
    for (int i = 0; i < N; i++) begin
      on_cnt = on_cnt + CW'(en[i]);
      if (!en[i] && !on_found) begin
        on_found = 1'b1;
        on_idx   = IW'(i);
      end
      if (en[i] && (!off_found || occ[i] < off_occ)) begin
        off_found = 1'b1;
        off_idx   = IW'(i);
        off_occ   = occ[i];
      end
    end
  end

  logic grow, shrink;
  assign grow      = (on_cnt < target) && on_found;
  assign shrink    = (on_cnt > target) && off_found && (off_occ == '0);
  assign want      = grow || shrink;
  assign at_target = (on_cnt == target);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) en[i] <= (i < RESET_ON);
    end else if (grant) begin
      if (grow)        en[on_idx]  <= 1'b1;
      else if (shrink) en[off_idx] <= 1'b0;
    end
  end
endmodule
