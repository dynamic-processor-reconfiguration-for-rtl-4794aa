// tb_rpe_selector: self-checking test of the RPE mode selector.
//
// Random per-mode IPC, power and AVF estimates (including zero and negative
// values, which the block treats as one LSB, and IPC above the clamp) are
// applied for a random current mode. A real-number model computes
//   log2 RPE = a (2 log2(IPC f) - log2 P) - b (log2 AVF + log2(f/fmax)
//              + c0 log2(e) (vmax - v))
// with a = 0.6, b = 0.4 and the mode table's f and v; each `lrpe` output must
// be within 0.01 of it, and `rec_mode` must be the model's choice (largest
// RPE, switching only above a 4 % gain) unless the decision lies within 0.01
// (log2) of a boundary. The latency of `done` is checked, and switches, holds
// inside the threshold and stays are counted and must all occur.
module tb_rpe_selector;
  import morph_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  start, busy, done;
  mode_e cur_mode, rec_mode;
  fx_t   ipc [NUM_MODES];
  fx_t   pwr [NUM_MODES];
  fx_t   avf [NUM_MODES];
  fx_t   lrpe [NUM_MODES];

  rpe_selector dut (.*);

  int checks = 0, failures = 0;
  int n_switch = 0, n_hold = 0, n_stay = 0, n_skip = 0;
  real t_f [4] = '{1.6, 2.0, 1.4, 1.2};
  real t_v [4] = '{0.8, 1.0, 0.8, 0.7};

  function automatic real lg2(fx_t v);
    real r;
    r = real'(v) / 65536.0;
    if (r < 1.0 / 65536.0) r = 1.0 / 65536.0;
    return $ln(r) / $ln(2.0);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic fx_t rnd(int lo, int hi);   // uniform in [lo, hi) x 1/1000
    return fx_t'(((lo + int'($urandom % (hi - lo))) * 65536) / 1000);
  endfunction

  initial begin
    real ref_l [4];
    real best, mc;
    int  c, bm, exp_m, lat;
    start = 0; cur_mode = MODE_AC;
    for (int m = 0; m < 4; m++) begin ipc[m] = 0; pwr[m] = 0; avf[m] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int it = 0; it < 3000; it++) begin
      c = $urandom % 4;
      for (int m = 0; m < 4; m++) begin
        ipc[m] = rnd(100, 3000);
        pwr[m] = rnd(500, 3000);
        avf[m] = rnd(50, 600);
        if (it % 2 == 1 && m != c) begin
          // near the current mode's values so that many cases fall near the threshold
          ipc[m] = ipc[c] + fx_t'(($urandom % 4000) - 2000);
          pwr[m] = pwr[c];
          avf[m] = avf[c];
        end
      end
      case (it % 97)
        5:  ipc[$urandom % 4] = 0;
        6:  pwr[$urandom % 4] = -fx_t'(100);
        7:  avf[$urandom % 4] = 0;
        8:  ipc[$urandom % 4] = fx_t'(12 << 16);
        default: ;
      endcase
      // model
      for (int m = 0; m < 4; m++) begin
        real i;
        i = real'(ipc[m]) / 65536.0;
        if (i > 8.0) i = 8.0;
        ref_l[m] = 0.6 * (2.0 * lg2(fx_t'(int'(i * 65536.0 * t_f[m]))) - lg2(pwr[m]))
                 - 0.4 * (lg2(avf[m]) + $ln(t_f[m] / 2.0) / $ln(2.0) + 0.01 * (1000.0 - t_v[m] * 1000.0));
      end
      mc = ref_l[c];
      bm = -1; best = 0.0;
      for (int m = 0; m < 4; m++) if (m != c && (bm < 0 || ref_l[m] > best)) begin bm = m; best = ref_l[m]; end
      exp_m = (best > mc + $ln(1.04) / $ln(2.0)) ? bm : c;
      // run
      cur_mode <= mode_e'(c);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      lat = 0;
      do begin @(posedge clk); #1; lat++; end while (!done && lat < 100);
      #1;
      checks++;
      if (lat != 22) begin failures++; $display("FAIL: latency %0d", lat); end
      for (int m = 0; m < 4; m++) begin
        checks++;
        if (rabs(real'(lrpe[m]) / 65536.0 - ref_l[m]) > 0.01) begin
          failures++; $display("FAIL: lrpe[%0d] %f exp %f", m, real'(lrpe[m]) / 65536.0, ref_l[m]);
        end
      end
      begin
        real margin, second;
        second = -1.0e9;
        for (int m = 0; m < 4; m++) if (m != c && m != bm && ref_l[m] > second) second = ref_l[m];
        margin = rabs(best - (mc + $ln(1.04) / $ln(2.0)));
        if (margin < 0.01 || (exp_m == bm && best - second < 0.01)) n_skip++;
        else begin
          checks++;
          if (int'(rec_mode) != exp_m) begin
            failures++; $display("FAIL: rec %0d exp %0d (cur %0d)", rec_mode, exp_m, c);
          end
          if (exp_m != c) n_switch++;
          else if (best > mc) n_hold++;
          else n_stay++;
        end
      end
      repeat ($urandom % 3) @(posedge clk);
    end
    checks++;
    if (n_switch == 0 || n_hold == 0 || n_stay == 0) begin failures++; $display("FAIL: coverage"); end
    $display("switch=%0d hold=%0d stay=%0d skipped=%0d", n_switch, n_hold, n_stay, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
