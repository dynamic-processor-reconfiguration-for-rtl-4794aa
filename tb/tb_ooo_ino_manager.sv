// tb_ooo_ino_manager: self-checking testbench of the two-mode OOO/InO morphing
// manager.
//
// Windows of counter values are generated at random, most of them chosen so
// that one mode is clearly better (by the reference model) to steer the core
// through several switches in both directions. For every window the testbench
// evaluates the regression expressions in double precision from the decimal
// coefficients, checks the three estimates (tolerance for the Q16.16 rounding),
// the latency of `rec_valid`, and the vote for the other mode (unless IPS^2/W
// of the two modes lies within 1 % of the threshold). After every HISTORY_DEPTH
// windows it checks the decision against its own majority count and, for a
// switch, follows it clock by clock: at most one unit enable changes per clock,
// the enables end at the pattern of the new mode, the pipeline flush is
// requested before the core enters InO and the mode changes only after
// `flushed`, and `rob_ptr_reset` pulses when the core returns to OOO. A window
// offered during a switch must be ignored.
module tb_ooo_ino_manager;
  import morph_pkg::*;

  localparam int unsigned HD  = 6;
  localparam int unsigned LAT = 19;   // pmc_valid to rec_valid, clocks

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        pmc_valid = 1'b0;
  fx_t         pmc [NUM_PMC];
  logic        mode_ooo, morphing, mode_changed, flush_req, flushed, rob_ptr_reset;
  logic        rob_en, rat_en, lsq_en, fpisq_en;
  logic [3:0]  fetch_en, decode_en, issue_en, int_alu_en;
  logic [1:0]  fp_alu_en;
  logic [2:0]  ls_unit_en;
  logic        rec_valid, rec_other, dec_valid, dec_switch;
  fx_t         est_ipc_other, est_pwr_other, est_pwr_cur;
  logic [31:0] switches;

  ooo_ino_manager dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model
  real l1h, ipc, bmp, st, ds;
  function automatic real m_ipc_other(bit ooo);
    return ooo ? -0.00616*l1h + 0.06671*ipc - 4.2e-4*bmp - 7.5e-5*ds + 0.2768
               : 4.5e-3*l1h + 4.417*ipc - 0.0273*bmp - 2.3255;
  endfunction
  function automatic real m_pwr_other(bit ooo);
    return ooo ? -0.0039*l1h + 0.9022*ipc + 0.0104*st - 0.0103*bmp + 4.4669
               : 0.080*l1h + 71.15*ipc - 0.4112*bmp - 38.46;
  endfunction
  function automatic real m_pwr_cur(bit ooo);
    return ooo ? 0.0141*l1h + 13.81*ipc + 0.0295*st - 0.0118*bmp - 0.2989
               : 0.0047*l1h + 13.062*ipc - 0.0069*st - 7.4e-5*ds + 1.5547;
  endfunction
  function automatic real rmax(real a, real b); return a > b ? a : b; endfunction
  function automatic real rabs(real a); return a < 0.0 ? -a : a; endfunction
  // ratio of IPC^2/P (other over current), clamped like the design
  function automatic real m_ratio(bit ooo);
    real io, po, pc;
    io = rmax(m_ipc_other(ooo), 0.0);
    po = rmax(m_pwr_other(ooo), 1.0/65536.0);
    pc = rmax(m_pwr_cur(ooo), 1.0/65536.0);
    if (ipc == 0.0) return (io > 0.0) ? 1.0e9 : 0.0;
    return (io*io/po) / (ipc*ipc/pc);
  endfunction

  function automatic fx_t to_fx(real v);
    return fx_t'($rtoi(v * 65536.0));
  endfunction

  // draw counters; want: 0 any, 1 other mode clearly better, 2 current clearly better
  task automatic draw(bit ooo, int want);
    real r;
    for (int tries = 0; tries < 2000; tries++) begin
      ipc = real'($urandom_range(5, 250)) / 100.0;
      l1h = real'($urandom_range(0, 60));
      bmp = real'($urandom_range(0, 40));
      st  = real'($urandom_range(0, 120));
      ds  = real'($urandom_range(0, 400));
      r   = m_ratio(ooo);
      if (want == 0 || (want == 1 && r > 1.2) || (want == 2 && r < 0.9)) break;
    end
    for (int i = 0; i < NUM_PMC; i++) pmc[i] = to_fx(real'($urandom_range(0, 500)));
    pmc[PMC_IPC] = to_fx(ipc);
    pmc[PMC_L1H] = to_fx(l1h);
    pmc[PMC_BMP] = to_fx(bmp);
    pmc[PMC_ST]  = to_fx(st);
    pmc[PMC_DS]  = to_fx(ds);
    pmc[PMC_ONE] = FX_ONE;
    // the design sees the values as rounded to Q16.16
    ipc = real'(pmc[PMC_IPC]) / 65536.0;
  endtask

  bit exp_ooo = 1'b1;
  int n_oth = 0, n_win = 0, n_switch = 0, n_to_ino = 0, n_to_ooo = 0, n_skip = 0;
  int n_dec = 0, n_stay = 0;

  task automatic tick(); @(posedge clk); #1; endtask

  // follow a switch until mode_changed
  task automatic follow_switch();
    logic [24:0] prev, cur;
    bit saw_flush, flushed_given;
    int cyc, n_fl;
    n_fl = 0;
    saw_flush = 0; flushed_given = 0; cyc = 0;
    prev = {rob_en, rat_en, lsq_en, fpisq_en, fetch_en, decode_en, issue_en,
            int_alu_en, fp_alu_en, ls_unit_en};
    tick();
    check(morphing, "switch starts one clock after the decision");
    // a window offered now must be ignored
    pmc_valid = 1'b1; tick(); pmc_valid = 1'b0;
    while (!mode_changed && cyc < 200) begin
      cur = {rob_en, rat_en, lsq_en, fpisq_en, fetch_en, decode_en, issue_en,
             int_alu_en, fp_alu_en, ls_unit_en};
      check($countones(cur ^ prev) <= 1, "one unit per clock");
      check(!rec_valid, "no estimate during a switch");
      check(mode_ooo == !exp_ooo, "mode held during the switch");
      prev = cur;
      if (flush_req) begin
        check(!exp_ooo, "flush only when entering InO");
        check(cur == {4'b0000, 4'b0011, 4'b0011, 4'b0011, 4'b0011, 2'b01, 3'b001},
              "units gated before the flush");
        saw_flush = 1;
        n_fl++;
        if (n_fl > 2 && $urandom_range(0, 3) == 0) begin flushed = 1'b1; flushed_given = 1; end
      end else if (saw_flush && !flushed_given) begin
        check(1'b0, "flush_req held until flushed");
      end
      tick();
      flushed = 1'b0;
      cyc++;
    end
    check(mode_changed, "switch completes");
    check(mode_ooo == exp_ooo, "new mode");
    check(rob_ptr_reset == exp_ooo, "ROB pointers reset on return to OOO");
    if (!exp_ooo) check(saw_flush && flushed_given, "flush handshake when entering InO");
    cur = {rob_en, rat_en, lsq_en, fpisq_en, fetch_en, decode_en, issue_en,
           int_alu_en, fp_alu_en, ls_unit_en};
    check(cur == (exp_ooo ? 25'h1FF_FFFF
                          : {4'b0000, 4'b0011, 4'b0011, 4'b0011, 4'b0011, 2'b01, 3'b001}),
          "unit enables of the new mode");
    tick();
    check(!morphing, "morphing ends");
  endtask

  task automatic window(int want);
    int lat;
    real r, e;
    bit exp_rec, decisive;
    draw(mode_ooo, want);
    r = m_ratio(mode_ooo);
    decisive = rabs(r / 1.04 - 1.0) > 0.01;
    exp_rec  = r > 1.04;
    pmc_valid = 1'b1; tick(); pmc_valid = 1'b0;
    lat = 1;
    while (!rec_valid && lat < 100) begin tick(); lat++; end
    check(lat == LAT, $sformatf("rec_valid latency %0d", lat));
    e = m_ipc_other(mode_ooo);
    check(rabs(real'(est_ipc_other)/65536.0 - e) < 0.02 + 1e-4*rabs(e), "IPC estimate");
    e = m_pwr_other(mode_ooo);
    check(rabs(real'(est_pwr_other)/65536.0 - e) < 0.02 + 1e-4*rabs(e), "power estimate, other");
    e = m_pwr_cur(mode_ooo);
    check(rabs(real'(est_pwr_cur)/65536.0 - e) < 0.02 + 1e-4*rabs(e), "power estimate, current");
    if (decisive) check(rec_other == exp_rec, $sformatf("vote (ratio %f)", r));
    else n_skip++;
    n_oth += int'(rec_other);
    n_win++;
    tick();
    if (n_win == HD) begin
      check(dec_valid, "decision after HISTORY_DEPTH windows");
      check(dec_switch == (2 * n_oth > HD), "majority decision");
      n_dec++;
      if (dec_switch) begin
        exp_ooo = !exp_ooo;
        n_switch++;
        if (exp_ooo) n_to_ooo++; else n_to_ino++;
        follow_switch();
        check(switches == 32'(n_switch), "switch count");
      end else n_stay++;
      n_win = 0; n_oth = 0;
    end else check(!dec_valid, "no decision before HISTORY_DEPTH windows");
    repeat ($urandom_range(0, 5)) tick();
  endtask

  initial begin
    flushed = 1'b0;
    for (int i = 0; i < NUM_PMC; i++) pmc[i] = '0;
    repeat (3) tick();
    rst_n = 1'b1;
    tick();
    check(mode_ooo && rob_en && fetch_en == 4'hF && ls_unit_en == 3'h7, "reset state OOO");
    // phases: steer with a clear majority, then mix, then random
    for (int ph = 0; ph < 40; ph++) begin
      int maj = $urandom_range(0, 2);
      for (int w = 0; w < int'(HD); w++) begin
        int want;
        if (ph < 12)      want = (ph % 2 == 0) ? 1 : 2;
        else if (ph < 30) want = (w < 3 + maj - 1) ? 1 : 2;
        else              want = 0;
        window(want);
      end
    end
    $display("switches %0d (to InO %0d, to OOO %0d), stays %0d, near-threshold votes skipped %0d",
             n_switch, n_to_ino, n_to_ooo, n_stay, n_skip);
    check(n_to_ino > 2 && n_to_ooo > 2, "switches in both directions");
    check(n_stay > 2, "decisions that keep the mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
