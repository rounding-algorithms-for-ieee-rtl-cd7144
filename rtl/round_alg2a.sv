// Algorithm 2A: round to nearest/up with one compound addition.
//
// The rounding bit Rin has already been injected into the multiplier array, so
// ch/sh (columns V down to R of the carry-save product) include it. A row of
// N+2 half adders turns the two vectors into a sum vector and a carry vector
// shifted left by one; this frees the carry slot at the R column, which takes
// Cin, the carry from the lower columns. An (N+2)-bit compound adder then
// produces A+B and A+B+1 in parallel. A+B+1 adds the overflow rounding bit Rv
// (another 2^-N at R). The V bit of A+B, which has not yet seen Rv, selects:
// V = 0 keeps A+B, V = 1 takes A+B+1 and shifts it right by one bit.
//
// rin = 0 is the truncate mode: the array must then be run without injection
// and Rv is forced to 0, so A+B is always taken and V only drives the shift.
//
// Outputs: mant is the N-bit result 1.f, exp_inc is 1 when the exponent must be
// incremented. Combinational.
module round_alg2a #(
  parameter int unsigned N = 24
) (
  input  logic [N+1:0] ch,
  input  logic [N+1:0] sh,
  input  logic         cin,
  input  logic         rin,
  output logic [N-1:0] mant,
  output logic         exp_inc
);
  logic [N+1:0] ha_s, ha_c, s0, s1;
  logic [N+1:1] res;
  logic [N:0]   gen;

  // row of N+2 half adders; Cin fills the empty carry slot at R
  assign ha_s = ch ^ sh;
  assign gen  = ch[N:0] & sh[N:0];   // carry out of column V is dropped
  assign ha_c = {gen[N:0], cin};

  csadd #(.W(N + 2)) u_csadd (
    .a (ha_s),
    .b (ha_c),
    .s0(s0),
    .s1(s1)
  );

  always_comb begin
    exp_inc = s0[N+1];                 // V from the A+B result
    res     = (exp_inc && rin) ? s1[N+1:1] : s0[N+1:1];   // R column dropped (s1[0] unused)
    mant    = exp_inc ? res[N+1:2] : res[N:1];
  end

endmodule
