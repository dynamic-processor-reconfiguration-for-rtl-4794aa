// tb_pmc_counters: self-checking test of the per-window counters.
//
// Drives random per-cycle event reports (0..4 commits, random cache, branch
// and instruction-type events, dispatch stalls) with `enable` dropping now and
// then, keeps its own running totals, and at every window of 500 committed
// instructions checks each Q16.16 PMC value, the window's cycle and
// instruction counts, IPC = floor(instructions x 65536 / cycles), the constant
// PMC, and that the vector is presented a fixed 50 clocks after the closing
// cycle (one clock to start the divider, 48 divider steps, one to register done).
module tb_pmc_counters;
  import morph_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        enable, pmc_valid;
  pmc_event_t  ev;
  fx_t         pmc [NUM_PMC];
  logic [31:0] win_cycles;
  logic [15:0] win_instr;

  pmc_counters dut (.*);

  localparam int LAT = 50;   // pmc_valid is set 49 clocks after the closing clock
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // running totals: index = PMC number (1..12), [0] unused
  longint tot [13];
  longint w_cyc, w_ins;
  // expected windows
  longint q_val [256][13];
  int     wr_i = 0, rd_i = 0;
  longint q_cyc [$], q_ins [$];
  int     q_at [$];
  int     windows = 0;

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && pmc_valid) begin
    longint ev_exp [13];
    longint ipc_exp;
    checks++;
    if (q_at.size() == 0) begin
      failures++; $display("FAIL: unexpected window");
    end else begin
      for (int i = 0; i < 13; i++) ev_exp[i] = q_val[rd_i % 256][i];
      rd_i++;
      if (cyc != q_at[0] + LAT) begin
        failures++; $display("FAIL: latency %0d", cyc - q_at[0]);
      end
      void'(q_at.pop_front());
      if (longint'(win_cycles) != q_cyc[0] || longint'(win_instr) != q_ins[0]) begin
        failures++; $display("FAIL: window cycles %0d/%0d instr %0d/%0d", win_cycles, q_cyc[0], win_instr, q_ins[0]);
      end
      ipc_exp = (q_ins[0] * 65536) / q_cyc[0];
      if (longint'(pmc[PMC_IPC]) != ipc_exp) begin
        failures++; $display("FAIL: IPC %0d exp %0d", pmc[PMC_IPC], ipc_exp);
      end
      for (int i = 1; i <= 12; i++) begin
        longint e;
        e = (ev_exp[i] > 32767) ? 32767 * 65536 : ev_exp[i] * 65536;
        if (longint'(pmc[i]) != e) begin
          failures++; $display("FAIL: pmc[%0d]=%0d exp %0d", i, pmc[i], e);
        end
      end
      if (pmc[PMC_ONE] != FX_ONE) begin failures++; $display("FAIL: constant"); end
      void'(q_cyc.pop_front());
      void'(q_ins.pop_front());
      windows++;
    end
  end

  initial begin
    int stall_phase;
    enable = 0; ev = '0;
    for (int i = 0; i < 13; i++) tot[i] = 0;
    w_cyc = 0; w_ins = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < 20000; k++) begin
      pmc_event_t e;
      stall_phase = (k / 3000) % 2;   // alternate busy and miss-heavy phases
      e.commit     = 3'(stall_phase ? ($urandom % 2) : ($urandom % 5));
      e.fetched    = 3'($urandom % 5);
      e.l1_hit     = 3'($urandom % 3);
      e.l1_miss    = 3'(stall_phase ? ($urandom % 2) : 0);
      e.l2_hit     = 3'($urandom % 2);
      e.l2_miss    = 3'(stall_phase ? ($urandom % 2) : 0);
      e.br_misp    = 3'($urandom % 8 == 0);
      e.c_int      = 3'($urandom % 4);
      e.c_fp       = 3'($urandom % 2);
      e.c_ld       = 3'($urandom % 3);
      e.c_st       = 3'($urandom % 2);
      e.c_br       = 3'($urandom % 2);
      e.disp_stall = ($urandom % 4 == 0);
      ev     <= e;
      enable <= ($urandom % 10 != 0);
      @(posedge clk);
      #1;
      // model the clock that was just sampled (dut saw ev/enable at the edge)
      if (enable) begin
        tot[1]  += e.l1_hit;  tot[2] += e.l1_miss; tot[3] += e.l2_hit;
        tot[4]  += e.l2_miss; tot[5] += e.br_misp; tot[6] += e.c_int;
        tot[7]  += e.c_fp;    tot[8] += e.c_ld;    tot[9] += e.c_st;
        tot[10] += e.c_br;    tot[11] += e.fetched; tot[12] += e.disp_stall;
        w_cyc++;
        w_ins += e.commit;
        if (w_ins >= 500) begin
          for (int i = 0; i < 13; i++) q_val[wr_i % 256][i] = tot[i];
          wr_i++;
          q_cyc.push_back(w_cyc);
          q_ins.push_back(w_ins);
          q_at.push_back(cyc - 1);
          for (int i = 0; i < 13; i++) tot[i] = 0;
          w_cyc = 0; w_ins = 0;
        end
      end
    end
    enable <= 1'b0;
    repeat (60) @(posedge clk);
    checks++;
    if (windows < 20 || q_at.size() != 0) begin
      failures++; $display("FAIL: windows=%0d pending=%0d", windows, q_at.size());
    end
    $display("windows=%0d", windows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
