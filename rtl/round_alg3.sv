// Algorithm 3: round to nearest/up with Cin removed from the critical path.
//
// Five bits meet at the R column: Rsum, Rcarry (the carry-save bits there), Rin,
// Rv and Cin. Only Rsum, Rcarry and Rin are known when the addition starts. Their
// sum (Sigma3) fixes the set of possible carries from R into L: {0,1} when
// Sigma3 = 1 and {1,2} when Sigma3 >= 2. The certain part of that carry is
// floor(Sigma3/2) (the OR of Rcarry and Rsum when Rin = 1). It goes into the
// carry slot at L freed by a row of half adders over the N+1 columns L..V. The
// R column itself is not added. An (N+1)-bit compound adder then gives A+B and
// A+B+1, which differ by exactly the remaining uncertain carry.
//
// When Cin arrives, the select logic follows the output-selection table: first
// a preliminary choice with Rv = 0, whose V bit is the true overflow and gives
// Rv (Rv = V and Rin). Then the final choice uses the full five-bit sum Sigma5:
// select A+B+1 when floor(Sigma5/2) exceeds the carry already placed at L.
// The chosen result is shifted right by one when its V bit is set.
//
// rin = 0 gives the truncated result: Rin = Rv = 0, and the slot bit becomes
// Rcarry and Rsum, which is floor(Sigma3/2) for Rin = 0 (this design's extension
// of the nearest/up scheme to truncation).
//
// Outputs: mant is the N-bit result 1.f, exp_inc is 1 when the exponent must be
// incremented. Combinational.
module round_alg3 #(
  parameter int unsigned N = 24
) (
  input  logic [N+1:0] ch,
  input  logic [N+1:0] sh,
  input  logic         cin,
  input  logic         rin,
  output logic [N-1:0] mant,
  output logic         exp_inc
);
  logic [N:0] a, b, s0, s1, res;
  logic [1:0] sigma3;
  logic       slot;

  assign sigma3 = 2'(ch[0]) + 2'(sh[0]) + 2'(rin);
  assign slot   = sigma3[1];                 // OR(Rcarry, Rsum) when Rin = 1

  // half adders on the N+1 columns L..V; slot fills the carry hole at L
  assign a = ch[N+1:1] ^ sh[N+1:1];
  assign b = {ch[N:1] & sh[N:1], slot};

  csadd #(.W(N + 1)) u_csadd (
    .a (a),
    .b (b),
    .s0(s0),
    .s1(s1)
  );

  // Output selection: A+B+1 when the R-to-L carry is larger than the slot bit
  function automatic logic pick_plus1(logic [1:0] s3, logic rv, logic c, logic placed);
    logic [2:0] sigma5;
    sigma5 = 3'(s3) + 3'(rv) + 3'(c);
    return (sigma5 >> 1) != 3'(placed);
  endfunction

  logic sel_pre, v_pre, rv, sel;

  always_comb begin
    sel_pre = pick_plus1(sigma3, 1'b0, cin, slot);
    v_pre   = sel_pre ? s1[N] : s0[N];
    rv      = v_pre & rin;
    sel     = pick_plus1(sigma3, rv, cin, slot);
    // Table 1: the carry from R to L exceeds the slot bit by at most one
    a_carry_set: assert (((3'(sigma3) + 3'(rv) + 3'(cin)) >> 1) - 3'(slot) <= 3'd1);
    res     = sel ? s1 : s0;
    exp_inc = res[N];
    mant    = exp_inc ? res[N:1] : res[N-1:0];
  end

endmodule
