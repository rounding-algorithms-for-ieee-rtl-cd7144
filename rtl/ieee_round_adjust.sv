// IEEE rounding correction applied after a rounding algorithm.
//
// The rounding algorithms give round to nearest/up (rin = 1) or a truncated
// result (rin = 0). This block turns that into the result of the selected mode:
//
//  - RM_RNU and RM_RTZ: the input is already the answer.
//  - RM_RNE: on a tie (discarded part exactly one half) round to nearest/up
//    rounded away from an even LSB only if L was 0, and it never propagated a
//    carry; forcing the result LSB to 0 gives round to nearest/even.
//  - RM_RUP / RM_RDN: the input is the truncated result; if any discarded bit
//    is 1 and the sign is + (RUP) or - (RDN), one unit in the last place is
//    added. If that carries the mantissa to 2.0 it is renormalized to 1.0 and
//    the exponent rises by one more.
//
// The discarded bits are judged at the final result position: product bit N-2
// (R) plus the sticky bit when the exponent was not incremented, product bits
// N-1 (R) and N-2 plus sticky when it was. The unrounded bits N-1 and N-2 are
// rebuilt from the carry-save L and R columns and Cin by a 2-bit addition. If
// nearest/up rounding itself overflowed, the result is 1.00..0, whose LSB is
// already 0, so judging the tie at the overflow position is harmless.
// The incrementer for the directed modes is this design's choice.
//
// Outputs: mant (1.f) and exp_adj, the total exponent increment (0..2).
// Combinational.
module ieee_round_adjust
  import rnd_pkg::*;
#(
  parameter int unsigned N = 24
) (
  input  rmode_e       mode,
  input  logic         sign,
  input  logic [N-1:0] mant_in,
  input  logic         exp_inc_in,
  input  logic [1:0]   lr_carry,
  input  logic [1:0]   lr_sum,
  input  logic         cin,
  input  logic         sticky,
  output logic [N-1:0] mant,
  output logic [1:0]   exp_adj
);
  logic [1:0] lr;         // unrounded product bits N-1 (L) and N-2 (R)
  logic       tie, inexact, up;
  logic [N:0] inc;

  assign lr = lr_carry + lr_sum + 2'(cin);

  always_comb begin
    if (exp_inc_in) begin
      tie     = lr[1] & ~lr[0] & ~sticky;
      inexact = lr[1] | lr[0] | sticky;
    end else begin
      tie     = lr[0] & ~sticky;
      inexact = lr[0] | sticky;
    end
    up  = inexact && ((mode == RM_RUP && !sign) || (mode == RM_RDN && sign));
    inc = {1'b0, mant_in} + (N+1)'(up);

    mant    = mant_in;
    exp_adj = {1'b0, exp_inc_in};
    unique case (mode)
      RM_RNE: mant[0] = mant_in[0] & ~tie;
      RM_RUP, RM_RDN: begin
        if (inc[N]) begin
          mant    = {1'b1, {(N-1){1'b0}}};
          exp_adj = exp_adj + 2'd1;
        end else begin
          mant    = inc[N-1:0];
        end
      end
      default: ;
    endcase
  end

endmodule
