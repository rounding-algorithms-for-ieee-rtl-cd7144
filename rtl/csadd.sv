// Compound (conditional sum) adder: s0 = a+b and s1 = a+b+1, modulo 2^W.
//
// The half-sum a^b and the generate terms are shared; only the carry chain is
// duplicated, one chain starting with carry-in 0 and one with carry-in 1. The
// rounding algorithms use the two results as "A+B" and "A+B+1" and pick one
// with a late select signal. Ripple chains are this design's choice.
// Combinational.
module csadd #(
  parameter int unsigned W = 26
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s0,
  output logic [W-1:0] s1
);
  always_comb begin
    logic [W-1:0] p, g;
    logic         c0, c1;
    p  = a ^ b;
    g  = a & b;
    c0 = 1'b0;
    c1 = 1'b1;
    for (int unsigned i = 0; i < W; i++) begin
      s0[i] = p[i] ^ c0;
      s1[i] = p[i] ^ c1;
      c0    = g[i] | (p[i] & c0);
      c1    = g[i] | (p[i] & c1);
    end
  end

endmodule
