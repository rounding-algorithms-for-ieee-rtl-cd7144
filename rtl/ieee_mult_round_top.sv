// IEEE mantissa multiplier with four interchangeable rounding datapaths.
//
// Two normalized N-bit mantissas x and y (1.f, MSB = 1) are multiplied into a
// 2N-bit carry-save product and rounded to N bits by each of the four rounding
// algorithms side by side, all on the same operands and mode:
//
//   index 0  Algorithm 1   two carry-propagate additions in series
//   index 1  Algorithm 2A  half-adder row + compound adder, Rin injected in the array
//   index 2  Algorithm 2B  half adders + two carry-save adders taking Rin and Cin
//   index 3  Algorithm 3   compound adder that does not wait for Cin
//
// Each algorithm produces round to nearest/up (nearest modes) or a truncated
// result (other modes); an ieee_round_adjust behind it turns that into the
// requested IEEE mode. All four must give identical results. Algorithm 2A
// reads its own multiplier array that has the rounding bit injected; the others
// share the plain array, which also supplies Cin (carry out of the low N-2
// columns), the unrounded L/R bits and the sticky bit.
//
// The three sticky-bit methods are all built and brought out: full addition
// then OR (sticky_cpa), trailing zeros of the operands (sticky_tz) and OR of
// the carry-save bits (sticky_cs). The IEEE correction uses sticky_cs; which
// method feeds the correction is this design's choice.
//
// Interface: mant[i] is the rounded mantissa 1.f of algorithm i, exp_adj[i] the
// exponent increment (0..2) to add to the sum of the operand exponents. Sign
// and exponent arithmetic are outside this block; sign only steers the
// directed modes. Fully combinational, no clock.
module ieee_mult_round_top
  import rnd_pkg::*;
#(
  parameter int unsigned N = 24
) (
  input  logic [N-1:0]        x,
  input  logic [N-1:0]        y,
  input  logic                sign,
  input  rmode_e              mode,
  output logic [3:0][N-1:0]   mant,
  output logic [3:0][1:0]     exp_adj,
  output logic                sticky_cpa,
  output logic                sticky_tz,
  output logic                sticky_cs
);
  localparam int unsigned W = 2 * N;

  logic         rin;
  logic [W-1:0] pc, ps;        // plain carry-save product
  logic [W-1:0] ic, is_;       // carry-save product with Rin injected
  logic         cin;
  logic [3:0][N-1:0] r_mant;
  logic [3:0]        r_exp;

  assign rin = mode_rin(mode);

  csa_array_mult #(.N(N)) u_mult (
    .x(x), .y(y), .inject(1'b0), .carry(pc), .sum(ps)
  );

  csa_array_mult #(.N(N)) u_mult_rin (
    .x(x), .y(y), .inject(rin), .carry(ic), .sum(is_)
  );

  lsb_carry #(.N(N)) u_cin (
    .carry_lo(pc[N-3:0]), .sum_lo(ps[N-3:0]), .cin(cin)
  );

  // Columns N-3..0 of the injected array equal those of the plain one, so Cin,
  // the sticky bit and the L/R bits all come from the plain array and the low
  // columns of the injected array are left unused.

  round_alg1 #(.N(N)) u_alg1 (
    .ch(pc[W-1:N-2]), .sh(ps[W-1:N-2]), .cin(cin), .rin(rin),
    .mant(r_mant[0]), .exp_inc(r_exp[0])
  );

  round_alg2a #(.N(N)) u_alg2a (
    .ch(ic[W-1:N-2]), .sh(is_[W-1:N-2]), .cin(cin), .rin(rin),
    .mant(r_mant[1]), .exp_inc(r_exp[1])
  );

  round_alg2b #(.N(N)) u_alg2b (
    .ch(pc[W-1:N-2]), .sh(ps[W-1:N-2]), .cin(cin), .rin(rin),
    .mant(r_mant[2]), .exp_inc(r_exp[2])
  );

  round_alg3 #(.N(N)) u_alg3 (
    .ch(pc[W-1:N-2]), .sh(ps[W-1:N-2]), .cin(cin), .rin(rin),
    .mant(r_mant[3]), .exp_inc(r_exp[3])
  );

  sticky_cpa #(.N(N)) u_sticky_cpa (
    .carry_lo(pc[N-3:0]), .sum_lo(ps[N-3:0]), .sticky(sticky_cpa)
  );

  sticky_tz #(.N(N)) u_sticky_tz (
    .x(x), .y(y), .sticky(sticky_tz)
  );

  sticky_cs #(.N(N)) u_sticky_cs (
    .carry_lo(pc[N-3:0]), .sum_lo(ps[N-3:0]), .sticky(sticky_cs)
  );

  // The four algorithms are interchangeable: for normalized operands they must
  // agree bit for bit.
  always_comb begin
    if (x[N-1] && y[N-1])
      a_algs_agree: assert (r_mant[1] == r_mant[0] && r_mant[2] == r_mant[0] &&
                            r_mant[3] == r_mant[0] && r_exp[1] == r_exp[0] &&
                            r_exp[2] == r_exp[0] && r_exp[3] == r_exp[0]);
  end

  for (genvar i = 0; i < 4; i++) begin : g_adjust
    ieee_round_adjust #(.N(N)) u_adjust (
      .mode(mode), .sign(sign),
      .mant_in(r_mant[i]), .exp_inc_in(r_exp[i]),
      .lr_carry(pc[N-1:N-2]), .lr_sum(ps[N-1:N-2]), .cin(cin),
      .sticky(sticky_cs),
      .mant(mant[i]), .exp_adj(exp_adj[i])
    );
  end

endmodule
