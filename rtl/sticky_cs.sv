// Sticky bit straight from the carry-save form: OR of the low carry and sum bits.
//
// When all partial products are positive (no Booth recoding), the lowest
// carry-save column that holds a 1 holds exactly one: the single partial
// product bit of that column, with no carry into it. That 1 cannot move during
// a later carry-propagate addition, so the product has a 1 right of the round
// bit exactly when one of the low carry or sum bits is 1. No addition is
// needed. Only valid for carry-save vectors from a non-recoded array such as
// csa_array_mult. Combinational.
module sticky_cs #(
  parameter int unsigned N = 24
) (
  input  logic [N-3:0] carry_lo,
  input  logic [N-3:0] sum_lo,
  output logic         sticky
);
  assign sticky = |(carry_lo | sum_lo);

endmodule
