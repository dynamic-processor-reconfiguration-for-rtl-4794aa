// seq_div: sequential unsigned divider, one quotient bit per clock.
//
// Computes q = (num << FRAC) / den as an unsigned W-bit quotient by restoring
// long division, so with FRAC = 16 the result is a Q16.16 ratio of two integers.
// The window counters use it to turn "instructions / cycles" into an IPC value.
// A division by zero returns all ones (the largest quotient).
//
// Interface: pulse `start` with `num` and `den` while `busy` is low; `done`
// pulses with `quo` valid W+FRAC clocks later. Inputs are captured at `start`.
// The algorithm and handshake are this implementation's own.
module seq_div #(
  parameter int unsigned W    = 32,
  parameter int unsigned FRAC = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] num,
  input  logic [W-1:0] den,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quo
);
  localparam int unsigned NB = W + FRAC;   // bits of the shifted dividend
  localparam int unsigned CW = $clog2(NB + 1);

  logic [NB-1:0] dividend_q;
  logic [W:0]    rem_q;
  logic [W-1:0]  den_q;
  logic [NB-1:0] quo_q;
  logic [CW-1:0] cnt_q;
  logic          zero_q;

  logic [W:0] rem_shift;
  assign rem_shift = {rem_q[W-1:0], dividend_q[NB-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      dividend_q <= '0;
      rem_q      <= '0;
      den_q      <= '0;
      quo_q      <= '0;
      cnt_q      <= '0;
      zero_q     <= 1'b0;
      quo        <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy       <= 1'b1;
        dividend_q <= NB'(num) << FRAC;
        rem_q      <= '0;
        den_q      <= den;
        quo_q      <= '0;
        cnt_q      <= CW'(NB);
        zero_q     <= (den == '0);
      end else if (busy) begin
        dividend_q <= dividend_q << 1;
        if (rem_shift >= {1'b0, den_q}) begin
          rem_q <= rem_shift - {1'b0, den_q};
          quo_q <= {quo_q[NB-2:0], 1'b1};
        end else begin
          rem_q <= rem_shift;
          quo_q <= {quo_q[NB-2:0], 1'b0};
        end
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          if (zero_q || (quo_q[NB-2:W-1] != '0))
            quo <= '1;   // divide by zero or overflow: saturate
          else
            quo <= {quo_q[W-2:0], (rem_shift >= {1'b0, den_q})};
        end
      end
    end
  end
endmodule
