// Carry-save array multiplier for two N-bit normalized mantissas.
//
// The partial products x & y[i] are split into two interleaved arrays, one for
// the even rows and one for the odd rows. In each array every row is a line of
// 3:2 carry-save adders that adds one partial product into a running sum/carry
// pair; row i only has adders in the columns its partial product reaches
// (i and up). The four vectors of the two arrays are then merged by two more
// carry-save rows into one 2N-bit carry-save product:
// carry + sum = x*y + inject*2^(N-2), modulo 2^(2N). The low columns stay in
// carry-save form, so their carry into the round bit (Cin) is computed outside.
// There is no carry propagation anywhere and no Booth recoding: every partial
// product is positive, which the carry-save sticky method (sticky_cs) needs.
//
// inject is the rounding bit Rin of Algorithm 2A. It enters the carry vector of
// the first row, a slot that is otherwise empty, at column N-2. With the product
// read as xx.(2N-2 fraction bits), column N-2 is the R bit (weight 2^-N) of an
// N-bit no-overflow result. Columns N-3..0 are not affected by it.
//
// The document asks only for "some type of reduction structure"; the linear
// array is this design's choice. Purely combinational.
module csa_array_mult #(
  parameter int unsigned N = 24
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  input  logic           inject,
  output logic [2*N-1:0] carry,
  output logic [2*N-1:0] sum
);
  localparam int unsigned W = 2 * N;

  function automatic logic [W-1:0] pprod(logic [N-1:0] a, logic [N-1:0] b, int unsigned i);
    return W'(a & {N{b[i]}}) << i;
  endfunction

  always_comb begin
    logic [W-1:0] se, ce, so, co, pp, live, t, u, ns, nc;
    // even rows; the empty carry slot of the first row takes the injected bit
    se = pprod(x, y, 0);
    ce = W'(inject) << (N - 2);
    // odd rows
    so = pprod(x, y, 1);
    co = '0;
    for (int unsigned i = 2; i < N; i++) begin
      pp   = pprod(x, y, i);
      live = {W{1'b1}} << i;                       // columns with an adder in row i
      if (i % 2 == 0) begin
        ns = ((se ^ ce ^ pp) & live) | (se & ~live);
        nc = ((((se & ce) | (se & pp) | (ce & pp)) & live) << 1) | (ce & ~live);
        se = ns;
        ce = nc;
      end else begin
        ns = ((so ^ co ^ pp) & live) | (so & ~live);
        nc = ((((so & co) | (so & pp) | (co & pp)) & live) << 1) | (co & ~live);
        so = ns;
        co = nc;
      end
    end
    // merge the two arrays: two carry-save rows
    t     = se ^ ce ^ so;
    u     = ((se & ce) | (se & so) | (ce & so)) << 1;
    sum   = t ^ u ^ co;
    carry = ((t & u) | (t & co) | (u & co)) << 1;
  end

endmodule
