// mac_unit: pipelined signed fixed-point multiply-accumulate, one MAC per cycle.
//
// The morphing controller evaluates its power and performance estimates as
// linear expressions of counter values, one multiply-accumulate per term. This
// unit accepts one term per clock: `in_valid` with coefficient `a` and operand
// `b` (both Q16.16). `in_first` starts a new sum and `in_last` closes it; the
// finished sum appears on `out_sum` with `out_valid` two clocks after the
// `in_last` term, together with the `in_tag` that came with that term.
// Stage 1 registers the full 64-bit product, stage 2 adds it (rounded back to
// Q16.16) to a 48-bit accumulator; the output saturates to the 32-bit range.
//
// A pipelined MAC doing one operation per cycle is the published design; the
// number format, the two-stage split, tags and saturation are own choices.
module mac_unit
  import morph_pkg::*;
#(
  parameter int unsigned TAG_W = 3,
  parameter int unsigned ACC_W = 48
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_first,
  input  logic             in_last,
  input  logic [TAG_W-1:0] in_tag,
  input  fx_t              a,
  input  fx_t              b,
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output fx_t              out_sum
);
  // stage 1: multiply
  logic                    s1_valid, s1_first, s1_last;
  logic [TAG_W-1:0]        s1_tag;
  logic signed [2*FX_W-1:0] s1_prod;

  // stage 2: accumulate
  logic signed [ACC_W-1:0] acc_q;
  logic signed [ACC_W-1:0] prod_fx;
  logic signed [ACC_W-1:0] acc_next;

  always_comb begin
    // round to nearest, then back to Q16.16
    prod_fx  = ACC_W'((s1_prod + (64'sd1 <<< (FX_F - 1))) >>> FX_F);
    acc_next = (s1_first ? '0 : acc_q) + prod_fx;
  end

  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'(64'sh7FFF_FFFF);
  localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(64'sh8000_0000);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_first  <= 1'b0;
      s1_last   <= 1'b0;
      s1_tag    <= '0;
      s1_prod   <= '0;
      acc_q     <= '0;
      out_valid <= 1'b0;
      out_tag   <= '0;
      out_sum   <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_first <= in_first;
      s1_last  <= in_last;
      s1_tag   <= in_tag;
      s1_prod  <= 64'(a) * 64'(b);
      out_valid <= 1'b0;
      if (s1_valid) begin
        acc_q <= acc_next;
        if (s1_last) begin
          out_valid <= 1'b1;
          out_tag   <= s1_tag;
          if (acc_next > MAXV)      out_sum <= fx_t'(32'h7FFF_FFFF);
          else if (acc_next < MINV) out_sum <= fx_t'(32'h8000_0000);
          else                      out_sum <= fx_t'(acc_next);
        end
      end
    end
  end
endmodule
