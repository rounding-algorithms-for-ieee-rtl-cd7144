// Self-checking testbench for csa_array_mult at N=24 and N=6 (exhaustive at 6).
// Checks that carry + sum equals x*y plus the injected rounding bit at column
// N-2 (modulo 2^2N), and that the lowest non-zero carry-save column holds a
// single 1 (the property the carry-save sticky method relies on).
module tb_csa_array_mult;
  import round_ref_pkg::*;

  localparam int NB = 24;
  localparam int NS = 6;

  logic [NB-1:0]   xb, yb;
  logic [2*NB-1:0] cb, sb;
  logic [NS-1:0]   xs, ys;
  logic [2*NS-1:0] cs, ss;
  logic            inj;
  int checks = 0, failures = 0;

  csa_array_mult #(.N(NB)) dut_b (.x(xb), .y(yb), .inject(inj), .carry(cb), .sum(sb));
  csa_array_mult #(.N(NS)) dut_s (.x(xs), .y(ys), .inject(inj), .carry(cs), .sum(ss));

  function automatic bit single_low_one(int w, u128 c, u128 s);
    for (int i = 0; i < w; i++)
      if (c[i] | s[i]) return !(c[i] & s[i]);
    return 1'b1;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 5) $display("FAIL %s", what);
    end
  endtask

  initial begin
    u128 x, y, exp_p;
    for (int k = 0; k < 4000; k++) begin
      gen_operands(NB, k % 4, x, y);
      xb  = x[NB-1:0];
      yb  = y[NB-1:0];
      inj = 1'($urandom_range(1));
      #1;
      exp_p = (x * y + (u128'(inj) << (NB - 2))) & mask(2 * NB);
      check(((u128'(cb) + u128'(sb)) & mask(2 * NB)) == exp_p, $sformatf("N=24 sum x=%h y=%h", x, y));
      check(single_low_one(2 * NB, u128'(cb), u128'(sb)) || inj, "N=24 single lowest one");
    end
    for (int i = 1 << (NS - 1); i < (1 << NS); i++)
      for (int j = 1 << (NS - 1); j < (1 << NS); j++)
        for (int r = 0; r < 2; r++) begin
          xs  = NS'(i);
          ys  = NS'(j);
          inj = 1'(r);
          #1;
          exp_p = (u128'(i * j) + (u128'(r) << (NS - 2))) & mask(2 * NS);
          check(((u128'(cs) + u128'(ss)) & mask(2 * NS)) == exp_p, $sformatf("N=6 sum %0d*%0d", i, j));
          if (r == 0) check(single_low_one(2 * NS, u128'(cs), u128'(ss)), "N=6 single lowest one");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
