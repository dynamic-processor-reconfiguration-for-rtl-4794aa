// tb_bank_group_ctrl: self-checking test of staggered bank power gating.
//
// A 16-bank group (the ROB) is given random target bank counts, random
// per-bank occupancies that drain over time, and a grant that is high on a
// random half of the clocks. Every clock the test checks: no bank changes
// without a grant; at most one bank changes per clock; a bank is switched on
// only when fewer than the target are on and it is the lowest-numbered off
// bank; a bank is switched off only when more than the target are on, it is
// empty, and no other powered bank holds fewer entries; a full (non-empty)
// least-occupied bank is waited for. Each target must be reached once the
// occupancies drain.
module tb_bank_group_ctrl;
  localparam int N = 16;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [4:0]       target;
  logic [4:0]       occ [N];
  logic             grant, want, at_target;
  logic [N-1:0]     en;

  bank_group_ctrl #(.N(N), .OCC_W(5), .RESET_ON(8)) dut (.*);

  int checks = 0, failures = 0;
  int waits = 0, ons = 0, offs = 0;

  function automatic int popc(logic [N-1:0] v);
    int c = 0;
    for (int i = 0; i < N; i++) c += int'(v[i]);
    return c;
  endfunction

  initial begin
    #3000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] en_before;
  int cnt_before, minocc, lowest_off;
  initial begin
    target = 5'd8;
    for (int i = 0; i < N; i++) occ[i] = '0;
    grant = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (en !== 16'h00FF) begin failures++; $display("FAIL: reset enables %h", en); end
    for (int round = 0; round < 60; round++) begin
      target = 5'($urandom % 17);
      for (int i = 0; i < N; i++) occ[i] = en[i] ? 5'($urandom % 17) : 5'd0;
      for (int t = 0; t < 200 && !(at_target && t > 0); t++) begin
        grant = $urandom % 2;
        #1;
        en_before  = en;
        cnt_before = popc(en);
        minocc = 99; lowest_off = -1;
        for (int i = 0; i < N; i++) begin
          if (en[i] && occ[i] < minocc) minocc = occ[i];
          if (!en[i] && lowest_off < 0) lowest_off = i;
        end
        if (cnt_before > target && minocc > 0) waits++;
        @(posedge clk);
        #1;
        checks++;
        if (!grant && en !== en_before) begin
          failures++; $display("FAIL: change without grant");
        end
        if (popc(en ^ en_before) > 1) begin
          failures++; $display("FAIL: more than one bank changed");
        end
        for (int i = 0; i < N; i++) begin
          if (en[i] && !en_before[i]) begin
            ons++;
            if (!(cnt_before < target) || i != lowest_off) begin
              failures++; $display("FAIL: bad power-on of bank %0d", i);
            end
          end
          if (!en[i] && en_before[i]) begin
            offs++;
            if (!(cnt_before > target) || occ[i] != 0 || minocc != 0) begin
              failures++; $display("FAIL: bad power-off of bank %0d occ %0d", i, occ[i]);
            end
          end
        end
        // entries drain: each powered bank loses one entry now and then
        for (int i = 0; i < N; i++)
          if (occ[i] != 0 && $urandom % 4 == 0) occ[i] = occ[i] - 1;
          else if (!en[i]) occ[i] = 0;
      end
      checks++;
      if (!at_target || popc(en) != target) begin
        failures++; $display("FAIL: round %0d target %0d not reached (%0d on)", round, target, popc(en));
      end
    end
    checks++;
    if (waits == 0 || ons == 0 || offs == 0) begin
      failures++; $display("FAIL: coverage waits=%0d ons=%0d offs=%0d", waits, ons, offs);
    end
    $display("waits=%0d ons=%0d offs=%0d", waits, ons, offs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
