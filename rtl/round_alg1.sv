// Algorithm 1: simple round to nearest/up, two carry-propagate additions in series.
//
// Inputs are the upper N+2 carry-save columns of the 2N-bit product, from the
// overflow bit V (weight 2^1) down to the round bit R (weight 2^-N), and Cin,
// the carry out of the N-2 columns below R. Step one adds them (the "CPAdd"
// stage, here the reduced N+2 bit adder with an input carry). Step two adds the
// rounding constant: 2^-N at R if the product is below 2, or 2^-(N-1) at the
// next column if it overflowed (2 <= product < 4). The result is then shifted
// right by one bit when it is 2 or more ("Normal"), which can also happen when
// the no-overflow rounding carries a 1.11..1 product up to exactly 2.
//
// rin = 1 gives round to nearest/up; rin = 0 drops both constants and gives the
// truncated result (round toward zero, and the base for the directed modes).
//
// Outputs: mant is the N-bit result 1.f (N-1 fraction bits), exp_inc is 1 when
// the exponent must be incremented. Combinational.
module round_alg1 #(
  parameter int unsigned N = 24
) (
  input  logic [N+1:0] ch,
  input  logic [N+1:0] sh,
  input  logic         cin,
  input  logic         rin,
  output logic [N-1:0] mant,
  output logic         exp_inc
);
  logic [N+1:0] u, radd, r;

  always_comb begin
    u       = ch + sh + (N+2)'(cin);                     // CPAdd
    radd    = u[N+1] ? (N+2)'({rin, 1'b0}) : (N+2)'(rin);  // Round
    r       = u + radd;
    exp_inc = r[N+1];                                    // Normal
    mant    = exp_inc ? r[N+1:2] : r[N:1];
  end

endmodule
