// Sticky bit from the operands, in parallel with the multiplication.
//
// In binary the product x*y has exactly tz(x) + tz(y) trailing zeros, tz being
// the trailing-zero count. The N-2 product bits right of the round bit are all
// zero, and the sticky bit is 0, exactly when tz(x) + tz(y) >= N-2. The
// counters are priority encoders from the LSB; their width is this design's
// choice. Combinational.
module sticky_tz #(
  parameter int unsigned N = 24
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic         sticky
);
  localparam int unsigned CW = $clog2(2 * N + 1);

  function automatic logic [CW-1:0] tz_count(logic [N-1:0] v);
    logic [CW-1:0] n;
    logic          seen;
    n    = '0;
    seen = 1'b0;
    for (int unsigned i = 0; i < N; i++) begin
      seen = seen | v[i];
      if (!seen) n = n + 1'b1;
    end
    return n;
  endfunction

  logic [CW-1:0] tz_sum;

  assign tz_sum = tz_count(x) + tz_count(y);
  assign sticky = tz_sum < CW'(N - 2);

endmodule
