// tb_seq_div: self-checking test of the sequential divider at its default size
// (32-bit, 16 fraction bits). Random and corner-case operands (zero divisor,
// quotients that overflow 32 bits, equal operands, one) are divided and the
// quotient is compared with ((num << 16) / den) saturated to 32 bits; the
// latency of `done` and the `busy` flag are checked too.
module tb_seq_div;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, busy, done;
  logic [31:0] num, den, quo;

  seq_div #(.W(32), .FRAC(16)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned e;
    int lat;
    start = 0; num = 0; den = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int it = 0; it < 2000; it++) begin
      case (it % 8)
        0: begin num <= $urandom; den <= $urandom; end
        1: begin num <= $urandom % 5000; den <= 1 + $urandom % 5000; end
        2: begin num <= $urandom; den <= 0; end
        3: begin num <= $urandom; den <= 1 + $urandom % 4; end
        4: begin num <= $urandom % 1000; den <= $urandom % 1000 + 1000; end
        5: begin e = $urandom; num <= 32'(e); den <= 32'(e); end
        default: begin num <= $urandom % 70000; den <= 1 + $urandom % 70000; end
      endcase
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      #1;
      checks++;
      if (!busy) begin failures++; $display("FAIL: not busy after start"); end
      e = (den == 0) ? 64'hFFFF_FFFF : ((64'(num) << 16) / 64'(den));
      if (e > 64'hFFFF_FFFF) e = 64'hFFFF_FFFF;
      lat = 0;
      while (!done && lat < 100) begin @(posedge clk); #1; lat++; end
      checks++;
      if (quo != 32'(e) || lat != 48) begin
        failures++;
        $display("FAIL: %0d / %0d -> %0d exp %0d (latency %0d)", num, den, quo, e, lat);
      end
      @(posedge clk);
      #1;
      checks++;
      if (busy) begin failures++; $display("FAIL: busy after done"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
