// Algorithm 2B: Algorithm 2A without injecting Rin into the multiplier.
//
// The upper N columns (V down to L+1) pass through a row of N half adders. The
// L and R columns instead get 3:2 carry-save adders, each with a free third
// input. Rin + Cin is split over these two slots: the R slot gets Rin xor Cin
// and the L slot gets Rin and Cin (adding 2 at R equals adding 1 at L). For
// Rin = 1 this is "not Cin" at R and "Cin" at L. The carry slot at R stays empty
// and is the carry-in of the (N+2)-bit compound adder, i.e. the place where Rv
// is added in A+B+1. Selection and normalization are as in Algorithm 2A: the V
// bit of A+B picks A+B (V = 0) or A+B+1 shifted right by one (V = 1).
//
// rin = 0 gives the truncated result (Rv forced to 0).
//
// Outputs: mant is the N-bit result 1.f, exp_inc is 1 when the exponent must be
// incremented. Combinational.
module round_alg2b #(
  parameter int unsigned N = 24
) (
  input  logic [N+1:0] ch,
  input  logic [N+1:0] sh,
  input  logic         cin,
  input  logic         rin,
  output logic [N-1:0] mant,
  output logic         exp_inc
);
  logic [N+1:0] a, s0, s1;
  logic [N:0]   k;                   // carry out of column V is dropped
  logic [N+1:1] res;
  logic         r_slot, l_slot;

  assign r_slot = rin ^ cin;
  assign l_slot = rin & cin;

  always_comb begin
    // half adders on columns N+1..2
    a = ch ^ sh;
    k = ch[N:0] & sh[N:0];
    // carry-save adders on the L (1) and R (0) columns
    a[1] = ch[1] ^ sh[1] ^ l_slot;
    k[1] = (ch[1] & sh[1]) | (ch[1] & l_slot) | (sh[1] & l_slot);
    a[0] = ch[0] ^ sh[0] ^ r_slot;
    k[0] = (ch[0] & sh[0]) | (ch[0] & r_slot) | (sh[0] & r_slot);
  end

  csadd #(.W(N + 2)) u_csadd (
    .a (a),
    .b ({k[N:0], 1'b0}),
    .s0(s0),
    .s1(s1)
  );

  always_comb begin
    exp_inc = s0[N+1];                 // V from the A+B result
    res     = (exp_inc && rin) ? s1[N+1:1] : s0[N+1:1];   // R column dropped (s1[0] unused)
    mant    = exp_inc ? res[N+1:2] : res[N:1];
  end

endmodule
