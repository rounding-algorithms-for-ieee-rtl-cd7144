// Carry out of the low N-2 carry-save columns (Cin).
//
// The rounding algorithms only need the upper N+2 product columns (V down to
// R); the low N-2 columns matter only through the carry they send into the R
// column. This block computes that carry with a generate/propagate chain and
// no sum outputs. The chain structure (ripple) is this design's choice.
// Combinational.
module lsb_carry #(
  parameter int unsigned N = 24
) (
  input  logic [N-3:0] carry_lo,
  input  logic [N-3:0] sum_lo,
  output logic         cin
);
  always_comb begin
    logic c;
    c = 1'b0;
    for (int unsigned i = 0; i < N - 2; i++)
      c = (carry_lo[i] & sum_lo[i]) | ((carry_lo[i] ^ sum_lo[i]) & c);
    cin = c;
  end

endmodule
