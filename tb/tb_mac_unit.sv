// tb_mac_unit: self-checking test of the pipelined multiply-accumulate unit.
//
// Issues back-to-back sums of one to five random Q16.16 terms, one term per
// clock with no gaps, and checks every finished sum against a reference
// computed here (each product rounded to nearest Q16.16, summed, saturated to
// 32 bits), its tag, and that it appears exactly two clocks after its last
// term (one MAC per cycle, two-stage pipeline). A few hand-worked sums are
// checked first.
module tb_mac_unit;
  import morph_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid, in_first, in_last;
  logic [2:0] in_tag;
  fx_t        a, b;
  logic       out_valid;
  logic [2:0] out_tag;
  fx_t        out_sum;

  mac_unit #(.TAG_W(3)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // expected results, in issue order
  fx_t exp_sum [$];
  int  exp_tag [$];
  int  exp_cyc [$];

  function automatic longint rnd_prod(fx_t x, fx_t y);
    longint p;
    p = longint'(x) * longint'(y);
    return (p + 64'sd32768) >>> 16;
  endfunction

  function automatic fx_t sat(longint v);
    if (v > 64'sd2147483647) return fx_t'(32'h7FFF_FFFF);
    if (v < -64'sd2147483648) return fx_t'(32'h8000_0000);
    return fx_t'(v);
  endfunction

  // drive one sum; returns after its last term has been presented
  task automatic do_sum(input fx_t av[], input fx_t bv[], input int tag);
    longint acc = 0;
    for (int i = 0; i < av.size(); i++) begin
      in_valid <= 1'b1;
      in_first <= (i == 0);
      in_last  <= (i == av.size() - 1);
      in_tag   <= 3'(tag);
      a <= av[i];
      b <= bv[i];
      acc += rnd_prod(av[i], bv[i]);
      @(posedge clk);
    end
    exp_sum.push_back(sat(acc));
    exp_tag.push_back(tag);
    exp_cyc.push_back(cycle + 2);   // last term sampled at this edge, result two edges later
  endtask

  // checker
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_sum.size() == 0) begin
      failures++;
      $display("FAIL: unexpected result %0d", out_sum);
    end else begin
      fx_t es;
      int  et, ec;
      es = exp_sum.pop_front();
      et = exp_tag.pop_front();
      ec = exp_cyc.pop_front();
      if (out_sum !== es || int'(out_tag) != et || cycle != ec) begin
        failures++;
        $display("FAIL: sum %0d exp %0d tag %0d exp %0d cycle %0d exp %0d",
                 out_sum, es, out_tag, et, cycle, ec);
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fx_t av[], bv[];
    int n;
    in_valid = 0; in_first = 0; in_last = 0; in_tag = 0; a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // 1.5 * 2.0 = 3.0
    av = '{fx_t'(32'h0001_8000)}; bv = '{fx_t'(32'h0002_0000)};
    do_sum(av, bv, 1);
    // 1.5*2 - 0.25*4 + 1*0.5 = 2.5
    av = '{fx_t'(32'h0001_8000), -fx_t'(32'h0000_4000), fx_t'(32'h0001_0000)};
    bv = '{fx_t'(32'h0002_0000),  fx_t'(32'h0004_0000), fx_t'(32'h0000_8000)};
    do_sum(av, bv, 2);
    // saturation: 30000 * 30000
    av = '{fx_t'(30000 << 16)}; bv = '{fx_t'(30000 << 16)};
    do_sum(av, bv, 3);
    for (int k = 0; k < 300; k++) begin
      n = 1 + ($urandom % 5);
      av = new[n]; bv = new[n];
      for (int i = 0; i < n; i++) begin
        av[i] = fx_t'($urandom) >>> ($urandom % 16);
        bv[i] = fx_t'($urandom) >>> (8 + $urandom % 16);
      end
      do_sum(av, bv, k % 8);
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_sum.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", exp_sum.size());
    end
    // the hand-worked values themselves
    checks++;
    if (rnd_prod(fx_t'(32'h0001_8000), fx_t'(32'h0002_0000)) != 64'sd196608) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
