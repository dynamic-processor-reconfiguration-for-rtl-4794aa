// tb_mode_history: self-checking test of the recommendation vote.
//
// Feeds random recommendations at random intervals, with the current mode
// changing now and then, and checks that a decision appears exactly after
// every HISTORY_DEPTH-th recommendation (one clock later), that it is the most
// frequent recommendation of that group (ties: the current mode if it is among
// the most frequent, else the lowest-numbered), and that a flush restarts the
// group. Runs at the default depth of 4.
module tb_mode_history;
  import morph_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  flush, rec_valid, dec_valid;
  mode_e cur_mode, rec_mode, dec_mode;

  mode_history dut (.*);

  localparam int D = 4;
  int checks = 0, failures = 0;
  int votes [4];
  int n = 0;
  logic  expect_dec = 1'b0;
  mode_e expect_mode;

  function automatic mode_e winner(mode_e cur);
    mode_e w = cur;
    int bv = votes[cur];
    for (int m = 0; m < 4; m++) if (votes[m] > bv) begin bv = votes[m]; w = mode_e'(m); end
    return w;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int decisions = 0;
  initial begin
    flush = 0; rec_valid = 0; cur_mode = MODE_AC; rec_mode = MODE_AC;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < 2000; k++) begin
      // stimulus for this clock
      rec_valid <= 1'b0;
      flush     <= 1'b0;
      if ($urandom % 50 == 0) begin
        flush <= 1'b1;
        cur_mode <= mode_e'($urandom % 4);
        for (int m = 0; m < 4; m++) votes[m] = 0;
        n = 0;
      end else if ($urandom % 3 == 0) begin
        mode_e r;
        // biased recommendations so that ties and clear winners both occur
        r = ($urandom % 2) ? mode_e'($urandom % 4) : mode_e'((k / 40) % 4);
        rec_valid <= 1'b1;
        rec_mode  <= r;
        votes[r]++;
        n++;
        if (n == D) begin
          expect_dec  = 1'b1;
          expect_mode = winner(cur_mode);
          for (int m = 0; m < 4; m++) votes[m] = 0;
          n = 0;
        end
      end
      @(posedge clk);
      #1;
      checks++;
      if (dec_valid !== expect_dec || (expect_dec && dec_mode !== expect_mode)) begin
        failures++;
        $display("FAIL k=%0d: dec_valid %0b exp %0b mode %0d exp %0d", k, dec_valid, expect_dec, dec_mode, expect_mode);
      end
      if (expect_dec) decisions++;
      expect_dec = 1'b0;
    end
    checks++;
    if (decisions < 50) begin failures++; $display("FAIL: only %0d decisions", decisions); end
    $display("decisions=%0d", decisions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
