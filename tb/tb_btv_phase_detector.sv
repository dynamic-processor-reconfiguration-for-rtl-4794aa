// tb_btv_phase_detector: self-checking test of the bottleneck-type-vector
// phase detector with a short interval (2000 instructions), M = 4 and room for
// four stored phases, so that phase replacement happens.
//
// The stimulus is a sequence of program phases, each a profile of per-cycle
// stall probabilities and commit rate: long stable phases, returns to earlier
// phases, one-interval glitches and six distinct profiles. A reference model
// counts the same events, forms the BTV with the same integer arithmetic and
// applies the same classification (nearest stored phase by sum of absolute
// differences, majority of M intervals for a new phase, round-robin
// replacement); every result of the block (BTV entries, match / new phase /
// unstable, phase id, minimum SAD, number of phases) is compared with it.
// Restart pulses are applied between intervals. Counts of matches, new phases,
// unstable candidates, replacements and restarts must all be non-zero.
module tb_btv_phase_detector;
  import morph_pkg::*;

  localparam int unsigned IL = 2000;
  localparam int unsigned MM = 4;
  localparam int unsigned NP = 4;
  localparam fx_t TH = fx_t'(5571);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       restart;
  logic [2:0] commit;
  logic [5:0] stall;
  logic       busy, btv_valid, match, new_phase, unstable, phase_known;
  fx_t        btv [7];
  logic [1:0] phase_id;
  fx_t        min_sad;
  logic [2:0] num_phases;

  btv_phase_detector #(.INTERVAL_LEN(IL), .THRESH(TH), .M(MM), .NUM_PHASES(NP)) dut (.*);

  int checks = 0, failures = 0;
  int n_match = 0, n_new = 0, n_unst = 0, n_repl = 0, n_restart = 0, n_int = 0;

  // ---------------- reference model
  longint cnt [7];
  longint cyc, ins;
  fx_t    tab [NP][7];
  bit     tab_v [NP];
  int     repl = 0, nph = 0;
  bit     cand = 0;
  int     cand_n = 0, cand_far = 0;
  fx_t    cand_btv [7];
  int     cur_pid = 0;
  // expected result of the last closed interval
  bit     pend = 0;
  fx_t    e_btv [7];
  int     e_kind;   // 0 none, 1 match, 2 new, 3 unstable
  int     e_pid;
  fx_t    e_sad;
  int     e_nph;

  function automatic fx_t absd(fx_t a, fx_t b);
    fx_t d;
    d = a - b;
    return d[31] ? -d : d;
  endfunction

  task automatic classify(fx_t b [7]);
    bit  ok, far;
    int  bp;
    fx_t bs;
    ok = 0; bs = '1; bp = 0;
    for (int p = 0; p < NP; p++) if (tab_v[p]) begin
      fx_t s;
      s = '0;
      for (int i = 0; i < 7; i++) s = s + absd(b[i], tab[p][i]);
      if (!ok || s < bs) begin ok = 1; bs = s; bp = p; end
    end
    far = !ok || bs > TH;
    e_sad = ok ? bs : '1;
    e_kind = 0;
    if (!cand) begin
      if (far) begin
        cand = 1; cand_n = 1; cand_far = 1;
        cand_btv = b;
      end else begin
        e_kind = 1; cur_pid = bp;
      end
    end else begin
      int nf;
      nf = cand_far + int'(far);
      if (far) cand_btv = b;
      if (cand_n == MM - 1) begin
        cand = 0; cand_n = 0; cand_far = 0;
        if (2 * nf > MM) begin
          if (tab_v[repl]) n_repl++;
          else nph++;
          tab[repl] = cand_btv;
          tab_v[repl] = 1;
          cur_pid = repl;
          repl = (repl + 1) % NP;
          e_kind = 2;
        end else begin
          e_kind = 3;
          if (!far) cur_pid = bp;
        end
      end else begin
        cand_n++; cand_far = nf;
      end
    end
    e_pid = cur_pid;
    e_nph = nph;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (restart) begin
      for (int i = 0; i < 7; i++) cnt[i] = 0;
      cyc = 0; ins = 0;
      cand = 0; cand_n = 0; cand_far = 0;
    end else begin
      for (int i = 0; i < 6; i++) cnt[i] += stall[i];
      cnt[6] += commit;
      cyc++;
      ins += commit;
      if (ins >= IL) begin
        for (int i = 0; i < 7; i++) e_btv[i] = fx_t'((cnt[i] << 16) / cyc);
        classify(e_btv);
        checks++;
        if (pend) begin failures++; $display("FAIL: previous interval never reported"); end
        pend = 1;
        n_int++;
        for (int i = 0; i < 7; i++) cnt[i] = 0;
        cyc = 0; ins = 0;
      end
    end
  end

  // ---------------- comparison
  always @(posedge clk) if (rst_n && btv_valid) begin
    int kind;
    kind = match ? 1 : new_phase ? 2 : unstable ? 3 : 0;
    checks++;
    if (!pend) begin failures++; $display("FAIL: unexpected result"); end
    pend = 0;
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (btv[i] != e_btv[i]) begin
        failures++; $display("FAIL: btv[%0d] %0d exp %0d", i, btv[i], e_btv[i]);
      end
    end
    checks++;
    if (int'(match) + int'(new_phase) + int'(unstable) > 1 || kind != e_kind ||
        min_sad != e_sad || int'(num_phases) != e_nph ||
        (e_kind != 0 && int'(phase_id) != e_pid)) begin
      failures++;
      $display("FAIL: kind %0d exp %0d pid %0d exp %0d sad %0d exp %0d nph %0d exp %0d",
               kind, e_kind, phase_id, e_pid, min_sad, e_sad, num_phases, e_nph);
    end
    if (kind == 1) n_match++;
    if (kind == 2) n_new++;
    if (kind == 3) n_unst++;
  end

  // ---------------- stimulus
  int prof_st [6][6];   // stall probability per mille
  int prof_c  [6];      // mean commit per cycle x 10
  int cur_prof = 0;
  always @(posedge clk) begin
    logic [5:0] s;
    int r;
    for (int i = 0; i < 6; i++) s[i] = ($urandom % 1000) < prof_st[cur_prof][i];
    r = $urandom % 20;
    commit <= 3'((r < prof_c[cur_prof] % 10 * 2) ? prof_c[cur_prof] / 10 + 1 : prof_c[cur_prof] / 10);
    stall  <= s;
  end

  initial begin
    #200000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_intervals(int prof, int n);
    int k;
    cur_prof = prof;
    k = 0;
    while (k < n) begin
      @(posedge clk);
      if (btv_valid) k++;
    end
  endtask

  initial begin
    int seq [$];
    for (int p = 0; p < 6; p++) begin
      for (int i = 0; i < 6; i++) prof_st[p][i] = 10 + $urandom % 60;
      prof_st[p][p] = 300 + 60 * p;   // a dominant bottleneck per profile
      prof_c[p] = 5 + 2 * p;          // 0.5 .. 1.5 instructions per clock
    end
    restart = 0; commit = 0; stall = 0;
    for (int i = 0; i < 7; i++) cnt[i] = 0;
    cyc = 0; ins = 0;
    for (int p = 0; p < NP; p++) tab_v[p] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    run_intervals(0, 8);
    run_intervals(1, 8);
    run_intervals(0, 6);     // return: match
    run_intervals(2, 1);     // glitch
    run_intervals(0, 6);
    run_intervals(3, 2);     // short: majority not reached
    run_intervals(0, 5);
    for (int k = 0; k < 12; k++) begin
      run_intervals($urandom % 6, 5 + $urandom % 6);
      if (k % 3 == 2) begin
        // restart between intervals, as after a migration
        while (busy) @(posedge clk);
        @(posedge clk);
        restart <= 1'b1;
        n_restart++;
        @(posedge clk);
        restart <= 1'b0;
      end
    end
    for (int p = 0; p < 6; p++) run_intervals(p, 6);
    run_intervals(0, 2);
    checks++;
    if (n_match == 0 || n_new == 0 || n_unst == 0 || n_repl == 0 || n_restart == 0) begin
      failures++; $display("FAIL: coverage");
    end
    $display("intervals=%0d matches=%0d new_phases=%0d unstable=%0d replacements=%0d restarts=%0d",
             n_int, n_match, n_new, n_unst, n_repl, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
