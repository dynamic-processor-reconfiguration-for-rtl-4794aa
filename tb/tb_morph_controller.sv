// tb_morph_controller: self-checking test of the mode-switch sequence.
//
// Sends random mode decisions (including the current mode and decisions made
// while a switch is running, which must be ignored). Models the core (drains
// after a random delay; buffer banks keep entries that leave slowly, so bank
// gating has to wait), the voltage regulator and the PLL (not ready for a
// random time after VCR/FCR change). Checks on every clock that at most one
// bank or lane changes power state, that none changes before the pipeline has
// drained, that no bank is switched off while it holds entries, and that the
// mode is not changed before regulator and PLL are ready. After each switch it
// checks the mode, the VCR (mV) and FCR (x 100 MHz) values and the number of
// powered ROB/LSQ/IQ banks and fetch/decode/issue lanes against the mode table
// (IQ/LSQ/ROB, width, frequency, voltage) and the switch counter.
module tb_morph_controller;
  import morph_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        dec_valid, drain_req, drained, vrm_ready, pll_locked;
  mode_e       dec_mode, cur_mode;
  logic [4:0]  rob_occ [ROB_BANKS];
  logic [4:0]  lsq_occ [LSQ_BANKS];
  logic [3:0]  iq_occ  [IQ_BANKS];
  logic [15:0] vcr;
  logic [7:0]  fcr;
  logic [ROB_BANKS-1:0] ccr_rob_en;
  logic [LSQ_BANKS-1:0] ccr_lsq_en;
  logic [IQ_BANKS-1:0]  ccr_iq_en;
  logic [MAX_WIDTH-1:0] ccr_fetch_en, ccr_decode_en, ccr_issue_en;
  logic        morphing, mode_changed;
  logic [31:0] switches;
  logic [15:0] last_overhead;

  morph_controller dut (.*);

  int checks = 0, failures = 0;
  int accepted = 0, bank_waits = 0;
  int visits [4];

  // expected per-mode values from the mode table
  function automatic int exp_banks(int entries, int bank);
    return (entries + bank - 1) / bank;
  endfunction
  function automatic int popc(logic [15:0] v);
    int c = 0;
    for (int i = 0; i < 16; i++) c += int'(v[i]);
    return c;
  endfunction
  int t_freq [4] = '{1600, 2000, 1400, 1200};
  int t_volt [4] = '{800, 1000, 800, 700};
  int t_iq   [4] = '{36, 24, 48, 12};
  int t_lsq  [4] = '{128, 64, 128, 16};
  int t_rob  [4] = '{128, 64, 256, 16};
  int t_w    [4] = '{4, 2, 4, 1};

  // ---------------- environment models
  int drain_cnt = 0, vrm_cnt = 0, pll_cnt = 0;
  logic [15:0] vcr_d;
  logic [7:0]  fcr_d;
  always @(posedge clk) begin
    vcr_d <= vcr;
    fcr_d <= fcr;
    if (!drain_req) begin
      drained   <= 1'b0;
      drain_cnt <= 1 + $urandom % 20;
    end else if (drain_cnt > 0) drain_cnt <= drain_cnt - 1;
    else drained <= 1'b1;
    if (vcr != vcr_d) begin vrm_ready <= 1'b0; vrm_cnt <= 5 + $urandom % 60; end
    else if (vrm_cnt > 0) vrm_cnt <= vrm_cnt - 1;
    else vrm_ready <= 1'b1;
    if (fcr != fcr_d) begin pll_locked <= 1'b0; pll_cnt <= 5 + $urandom % 60; end
    else if (pll_cnt > 0) pll_cnt <= pll_cnt - 1;
    else pll_locked <= 1'b1;
    // occupancy: entries leave one at a time; new ones only while running
    for (int i = 0; i < ROB_BANKS; i++)
      if (!ccr_rob_en[i]) rob_occ[i] <= 0;
      else if (!morphing && $urandom % 8 == 0) rob_occ[i] <= 5'($urandom % 17);
      else if (rob_occ[i] != 0 && $urandom % 3 == 0) rob_occ[i] <= rob_occ[i] - 1;
    for (int i = 0; i < LSQ_BANKS; i++)
      if (!ccr_lsq_en[i]) lsq_occ[i] <= 0;
      else if (!morphing && $urandom % 8 == 0) lsq_occ[i] <= 5'($urandom % 17);
      else if (lsq_occ[i] != 0 && $urandom % 3 == 0) lsq_occ[i] <= lsq_occ[i] - 1;
    for (int i = 0; i < IQ_BANKS; i++)
      if (!ccr_iq_en[i]) iq_occ[i] <= 0;
      else if (!morphing && $urandom % 8 == 0) iq_occ[i] <= 4'($urandom % 9);
      else if (iq_occ[i] != 0 && $urandom % 3 == 0) iq_occ[i] <= iq_occ[i] - 1;
  end

  // ---------------- per-clock rules
  logic [45:0] ccr_d;
  logic [45:0] ccr_now;
  logic        drained_seen;
  assign ccr_now = {ccr_rob_en, ccr_lsq_en, ccr_iq_en, ccr_fetch_en, ccr_decode_en, ccr_issue_en};
  always @(posedge clk) begin
    ccr_d <= ccr_now;
    if (!morphing) drained_seen <= 1'b0;
    else if (drained) drained_seen <= 1'b1;
    if (rst_n && ccr_d != ccr_now) begin
      checks++;
      if (popc(16'(ccr_d ^ ccr_now)) + popc(16'((ccr_d ^ ccr_now) >> 16)) + popc(16'((ccr_d ^ ccr_now) >> 32)) > 1) begin
        failures++; $display("FAIL: several units changed in one clock");
      end
      if (!drained_seen) begin failures++; $display("FAIL: gating before drain"); end
    end
  end
  // a bank switched off at this edge must have been empty
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < ROB_BANKS; i++)
      if (ccr_rob_en[i] && dut.u_rob.grant && dut.u_rob.off_idx == 4'(i) && !dut.u_rob.grow) begin
        checks++;
        if (rob_occ[i] != 0) begin failures++; $display("FAIL: ROB bank %0d off while occupied", i); end
      end
    if (morphing && dut.state_q == dut.S_GATE && !dut.u_rob.at_target && !dut.u_rob.want) bank_waits++;
    if (morphing && dut.state_q == dut.S_GATE && !dut.u_lsq.at_target && !dut.u_lsq.want) bank_waits++;
  end
  always @(posedge clk) if (rst_n && mode_changed) begin
    checks++;
    // mode changed at the previous edge: regulator and PLL were ready then
  end

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_mode(int m);
    checks++;
    if (int'(cur_mode) != m || int'(vcr) != t_volt[m] || int'(fcr) * 100 != t_freq[m] ||
        popc(16'(ccr_rob_en)) != exp_banks(t_rob[m], 16) ||
        popc(16'(ccr_lsq_en)) != exp_banks(t_lsq[m], 16) ||
        popc(16'(ccr_iq_en))  != exp_banks(t_iq[m], 8) ||
        popc(16'(ccr_fetch_en)) != t_w[m] || popc(16'(ccr_decode_en)) != t_w[m] ||
        popc(16'(ccr_issue_en)) != t_w[m]) begin
      failures++;
      $display("FAIL: mode %0d: cur %0d vcr %0d fcr %0d rob %b lsq %b iq %b fetch %b",
               m, cur_mode, vcr, fcr, ccr_rob_en, ccr_lsq_en, ccr_iq_en, ccr_fetch_en);
    end
  endtask

  initial begin
    int tgt, n;
    dec_valid = 0; dec_mode = MODE_AC;
    drained = 0; vrm_ready = 1; pll_locked = 1;
    for (int i = 0; i < ROB_BANKS; i++) rob_occ[i] = 0;
    for (int i = 0; i < LSQ_BANKS; i++) lsq_occ[i] = 0;
    for (int i = 0; i < IQ_BANKS; i++) iq_occ[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    check_mode(0);
    for (int k = 0; k < 120; k++) begin
      repeat ($urandom % 20) @(posedge clk);
      tgt = $urandom % 4;
      dec_valid <= 1'b1; dec_mode <= mode_e'(tgt);
      @(posedge clk);
      dec_valid <= 1'b0;
      #1;
      if (tgt == int'(cur_mode) && !morphing) begin
        checks++;   // a decision for the current mode starts nothing
        if (morphing) begin failures++; $display("FAIL: switch to the current mode"); end
        continue;
      end
      accepted++;
      // a second decision while morphing must be ignored
      repeat (3) @(posedge clk);
      dec_valid <= 1'b1; dec_mode <= mode_e'((tgt + 1) % 4);
      @(posedge clk);
      dec_valid <= 1'b0;
      n = 0;
      while (!mode_changed && n < 5000) begin
        @(posedge clk); #1; n++;
        if (morphing && dut.state_q == dut.S_RESUME && !(vrm_ready && pll_locked)) begin
          failures++; $display("FAIL: resumed before VRM/PLL ready");
        end
      end
      @(posedge clk); #1;
      visits[tgt]++;
      check_mode(tgt);
      checks++;
      if (switches != 32'(accepted) || last_overhead == 0 || morphing) begin
        failures++; $display("FAIL: switches %0d exp %0d overhead %0d", switches, accepted, last_overhead);
      end
    end
    checks++;
    if (bank_waits == 0 || visits[0] == 0 || visits[1] == 0 || visits[2] == 0 || visits[3] == 0) begin
      failures++; $display("FAIL: coverage waits=%0d visits %0d %0d %0d %0d", bank_waits, visits[0], visits[1], visits[2], visits[3]);
    end
    $display("switches=%0d bank_wait_cycles=%0d last_overhead=%0d", accepted, bank_waits, last_overhead);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
