// Sticky bit by definition: carry-propagate add the low carry-save columns and
// OR the resulting product bits.
//
// The inputs are the N-2 columns right of the round bit R (product bits N-3..0
// for a no-overflow result). The sticky bit is 1 when any of those product bits
// is 1. This needs a full-width addition before the OR, which is what the
// other two sticky methods avoid. The overflow case, where the old R bit also
// falls right of the new R bit, is handled by the IEEE correction block.
// Combinational.
module sticky_cpa #(
  parameter int unsigned N = 24
) (
  input  logic [N-3:0] carry_lo,
  input  logic [N-3:0] sum_lo,
  output logic         sticky
);
  logic [N-3:0] low_bits;

  assign low_bits = carry_lo + sum_lo;
  assign sticky   = |low_bits;

endmodule
