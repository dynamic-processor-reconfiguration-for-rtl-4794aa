// tb_ips2w_estimator: self-checking test of the IPS^2/Watt estimator.
//
// Part 1 uses the reset coefficient table (the published fit for the average
// mode) with random counter vectors; part 2 loads random coefficient tables
// through the configuration port for every current mode; part 3 loads a table
// that puts another mode's IPS^2/Watt within -5 % .. +10 % of the current
// mode's, so that the 5 % threshold decides. For each estimate the
// test recomputes, in plain integer arithmetic, every power and IPC expression
// (per-term rounding to Q16.16, 48-bit sum, 32-bit saturation) and compares the
// estimates bit for bit. It recomputes IPS^2/Watt of every mode in real
// arithmetic and checks the recommendation: the best mode if it beats the
// current mode by 5 %, else the current one (near-ties are skipped). It also
// checks one power value worked out by hand, that each estimate uses exactly
// 35 MAC operations, and that `done` comes a fixed 49 clocks after `start`.
module tb_ips2w_estimator;
  import morph_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       start, cfg_we, busy, done;
  mode_e      cur_mode, cfg_src, rec_mode;
  fx_t        pmc [NUM_PMC];
  logic [2:0] cfg_expr, cfg_term;
  term_t      cfg_data;
  fx_t        est_ipc [NUM_MODES];
  fx_t        est_pwr [NUM_MODES];
  logic [7:0] mac_ops;

  ips2w_estimator dut (.*);

  localparam int LAT = 49;
  int checks = 0, failures = 0, skipped = 0, holds = 0;
  int recs [4];
  term_t tab [4][8][5];

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint eval_expr(int src, int e);
    longint acc = 0, p;
    for (int t = 0; t < 5; t++) begin
      p = longint'(tab[src][e][t].coef) * longint'(pmc[tab[src][e][t].sel]);
      acc += (p + 32768) >>> 16;
    end
    if (acc > 64'sh7FFF_FFFF) acc = 64'sh7FFF_FFFF;
    if (acc < -64'sh8000_0000) acc = -64'sh8000_0000;
    return acc;
  endfunction

  task automatic run_one(mode_e cm);
    int n;
    longint pw [4], ip [4];
    real metric [4], best_v, cur_v, second;
    int best;
    mode_e expect_m;
    cur_mode <= cm;
    start    <= 1'b1;
    @(posedge clk);
    start    <= 1'b0;
    n = 0;
    while (!done && n < 500) begin @(posedge clk); n++; end
    #1;
    checks++;
    if (n != LAT) begin failures++; $display("FAIL: latency %0d", n); end
    checks++;
    if (mac_ops != 8'd35) begin failures++; $display("FAIL: mac_ops %0d", mac_ops); end
    for (int m = 0; m < 4; m++) begin
      pw[m] = eval_expr(cm, m);
      ip[m] = (m == int'(cm)) ? longint'(pmc[PMC_IPC]) : eval_expr(cm, 4 + m);
      checks++;
      if (longint'(est_pwr[m]) != pw[m] || longint'(est_ipc[m]) != ip[m]) begin
        failures++;
        $display("FAIL: mode %0d pwr %0d exp %0d ipc %0d exp %0d", m, est_pwr[m], pw[m], est_ipc[m], ip[m]);
      end
      begin
        real ipc_r, p_r, f;
        ipc_r = ip[m] / 65536.0;
        if (ipc_r < 0) ipc_r = 0;
        if (ipc_r > 8) ipc_r = 8;
        p_r = pw[m] / 65536.0;
        if (p_r < 0.01) p_r = 0.01;
        f = mode_cfg(mode_e'(m)).freq_mhz / 1000.0;
        metric[m] = (ipc_r * f) * (ipc_r * f) / p_r;
      end
    end
    cur_v = metric[cm];
    best = int'(cm);
    best_v = cur_v * 1.05;
    for (int m = 0; m < 4; m++) if (m != int'(cm) && metric[m] > best_v) begin best_v = metric[m]; best = m; end
    expect_m = mode_e'(best);
    // near ties of fixed-point rounding are not judged
    second = 0;
    for (int m = 0; m < 4; m++) begin
      real r;
      if (m == best) continue;
      r = (m == int'(cm)) ? cur_v * 1.05 : metric[m];
      if (r > 0 && best_v > 0 && (best_v / r) < 1.02 && (best_v / r) > 0.98) second = 1;
    end
    if (cur_v < 1e-6) second = 1;
    if (second != 0) skipped++;
    else begin
      checks++;
      recs[expect_m]++;
      for (int m = 0; m < 4; m++) if (m != int'(cm) && expect_m == cm && metric[m] > cur_v) begin
        holds++;
        break;
      end
      if (rec_mode != expect_m) begin
        failures++;
        $display("FAIL: rec %0d exp %0d (metrics %f %f %f %f, cur %0d)", rec_mode, expect_m,
                 metric[0], metric[1], metric[2], metric[3], cm);
      end
    end
    @(posedge clk);
  endtask

  task automatic rand_pmc();
    pmc[PMC_IPC] = fx_t'(6554 + $urandom % (4 * 65536));   // 0.1 .. 4.1
    for (int i = 1; i < 13; i++) pmc[i] = fx_t'(($urandom % 200) << 16);
    pmc[PMC_ONE] = FX_ONE;
  endtask

  initial begin
    start = 0; cfg_we = 0; cfg_src = MODE_AC; cfg_expr = 0; cfg_term = 0; cfg_data = '0;
    cur_mode = MODE_AC;
    for (int i = 0; i < NUM_PMC; i++) pmc[i] = '0;
    for (int s = 0; s < 4; s++) for (int e = 0; e < 8; e++) for (int t = 0; t < 5; t++)
      tab[s][e][t] = default_term(e, t);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // hand-worked: AC power with L1h=100, IPC=2, St=10, Bmp=5:
    // 918*100/65536... = 0.014*100 + 13.81*2 + 0.0295*10 - 0.0118*5 - 0.29 ~= 28.966
    for (int i = 0; i < NUM_PMC; i++) pmc[i] = '0;
    pmc[PMC_L1H] = fx_t'(100 << 16); pmc[PMC_IPC] = fx_t'(2 << 16);
    pmc[PMC_ST]  = fx_t'(10 << 16);  pmc[PMC_BMP] = fx_t'(5 << 16);
    pmc[PMC_ONE] = FX_ONE;
    run_one(MODE_AC);
    checks++;
    if (est_pwr[0] < fx_t'(1898000) || est_pwr[0] > fx_t'(1898500)) begin
      failures++; $display("FAIL: hand-worked AC power %0d", est_pwr[0]);
    end

    // part 1: published table, current mode AC
    for (int k = 0; k < 150; k++) begin rand_pmc(); run_one(MODE_AC); end

    // part 2: random tables for every current mode, loaded through cfg
    for (int s = 0; s < 4; s++) for (int e = 0; e < 8; e++) for (int t = 0; t < 5; t++) begin
      term_t tt;
      tt.sel  = (t == 4) ? PMC_ONE : pmc_e'($urandom % 13);
      tt.coef = (e < 4) ? fx_t'($urandom % 3000) : fx_t'(int'($urandom % 4000) - 1000);
      if (e < 4 && t == 4) tt.coef = fx_t'(65536 / 4 + $urandom % 65536);
      if (e >= 4 && tt.sel == PMC_IPC) tt.coef = fx_t'(32768 + $urandom % 65536);
      tab[s][e][t] = tt;
      cfg_we <= 1'b1; cfg_src <= mode_e'(s); cfg_expr <= 3'(e); cfg_term <= 3'(t); cfg_data <= tt;
      @(posedge clk);
    end
    cfg_we <= 1'b0;
    @(posedge clk);
    for (int k = 0; k < 400; k++) begin rand_pmc(); run_one(mode_e'($urandom % 4)); end

    // part 3: another mode's metric within a few per cent of the current one,
    // so that the threshold decides. Power 1 W for every mode; the IPC of every
    // other mode is 0.01 x L1 hits, the L1 hit count setting the ratio.
    for (int s = 0; s < 4; s++) for (int e = 0; e < 8; e++) for (int t = 0; t < 5; t++) begin
      term_t tt;
      tt = '{sel: PMC_ONE, coef: '0};
      if (t == 0 && e < 4)  tt = '{sel: PMC_ONE, coef: FX_ONE};
      if (t == 0 && e >= 4) tt = '{sel: PMC_L1H, coef: fx_t'(655)};
      tab[s][e][t] = tt;
      cfg_we <= 1'b1; cfg_src <= mode_e'(s); cfg_expr <= 3'(e); cfg_term <= 3'(t); cfg_data <= tt;
      @(posedge clk);
    end
    cfg_we <= 1'b0;
    @(posedge clk);
    for (int k = 0; k < 300; k++) begin
      mode_e cm;
      real fc, fb, ratio, ipc_o;
      cm = mode_e'($urandom % 4);
      rand_pmc();
      fc = mode_cfg(cm).freq_mhz / 1000.0;
      fb = (cm == MODE_NC) ? 1.6 : 2.0;        // fastest other mode
      ratio = 0.95 + ($urandom % 1500) / 10000.0;   // 0.95 .. 1.10
      ipc_o = pmc[PMC_IPC] / 65536.0 * fc / fb * $sqrt(ratio);
      pmc[PMC_L1H] = fx_t'(int'(ipc_o / 0.01 * 65536.0 / (655.0 / 655.36)));
      run_one(cm);
    end

    checks++;
    if (holds == 0) begin failures++; $display("FAIL: no threshold hold judged"); end
    checks++;
    if (recs[0] + recs[1] + recs[2] + recs[3] < 300) begin
      failures++; $display("FAIL: too few judged recommendations");
    end
    $display("recommended AC=%0d NC=%0d LW=%0d SM=%0d skipped=%0d holds=%0d", recs[0], recs[1], recs[2], recs[3], skipped, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
