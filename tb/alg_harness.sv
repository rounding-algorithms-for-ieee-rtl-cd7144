// Test harness for the four rounding algorithm units at one width N.
//
// ALG selects the unit: 0 round_alg1, 1 round_alg2a, 2 round_alg2b,
// 3 round_alg3. For each operand pair the exact product is split into a random
// carry-save pair (with the rounding bit added at the R column for Algorithm
// 2A in nearest mode, as its array would inject it), the upper N+2 columns and
// the carry out of the low N-2 columns are applied, and mant/exp_inc are
// compared with round_ref_pkg::alg_ref for both nearest/up and truncation.
// EXHAUSTIVE walks all normalized operand pairs (small N only); otherwise
// VECTORS random pairs of all operand kinds are used.
module alg_harness
  import round_ref_pkg::*;
#(
  parameter int N          = 24,
  parameter int ALG        = 0,
  parameter bit EXHAUSTIVE = 1'b0,
  parameter int VECTORS    = 4000
) (
  output int checks,
  output int failures,
  output bit done
);
  logic [N+1:0] ch, sh;
  logic         cin, rin;
  logic [N-1:0] mant;
  logic         exp_inc;

  if (ALG == 0) begin : g_dut
    round_alg1  #(.N(N)) dut (.ch, .sh, .cin, .rin, .mant, .exp_inc);
  end else if (ALG == 1) begin : g_dut
    round_alg2a #(.N(N)) dut (.ch, .sh, .cin, .rin, .mant, .exp_inc);
  end else if (ALG == 2) begin : g_dut
    round_alg2b #(.N(N)) dut (.ch, .sh, .cin, .rin, .mant, .exp_inc);
  end else begin : g_dut
    round_alg3  #(.N(N)) dut (.ch, .sh, .cin, .rin, .mant, .exp_inc);
  end

  task automatic apply(u128 x, u128 y);
    u128 p, pin, c, s, em;
    bit  ee;
    for (int r = 0; r < 2; r++) begin
      p   = x * y;
      pin = p + ((ALG == 1 && r == 1) ? (u128'(1) << (N - 2)) : u128'(0));
      cs_split(2 * N, pin, c, s);
      ch  = c[2*N-1 -: N+2];
      sh  = s[2*N-1 -: N+2];
      cin = low_carry(N - 2, c, s);
      rin = 1'(r);
      #1;
      alg_ref(N, p, 1'(r), em, ee);
      checks++;
      if (mant !== em[N-1:0] || exp_inc !== ee) begin
        failures++;
        if (failures <= 5)
          $display("ALG%0d N=%0d x=%h y=%h rin=%0d: got %h/%0d expected %h/%0d",
                   ALG, N, x, y, r, mant, exp_inc, em[N-1:0], ee);
      end
    end
  endtask

  initial begin
    u128 x, y;
    checks = 0;
    failures = 0;
    done = 1'b0;
    if (EXHAUSTIVE) begin
      for (int i = 1 << (N - 1); i < (1 << N); i++)
        for (int j = 1 << (N - 1); j < (1 << N); j++)
          apply(u128'(i), u128'(j));
    end else begin
      for (int k = 0; k < VECTORS; k++) begin
        gen_operands(N, k % 4, x, y);
        apply(x, y);
      end
    end
    done = 1'b1;
  end

endmodule
