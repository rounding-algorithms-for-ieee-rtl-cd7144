// Self-checking testbench for ieee_round_adjust, exhaustive at N=6 and random
// at N=24. Its inputs are what a rounding algorithm and the sticky logic would
// deliver (nearest/up for RNE/RNU, truncation otherwise, computed by the
// exact-product model); its outputs are compared with a direct IEEE rounding of
// the exact product for every mode and both signs.
module tb_ieee_round_adjust;
  import rnd_pkg::*;
  import round_ref_pkg::*;

  int checks = 0, failures = 0;
  int ties = 0, incs = 0, inc_ovf = 0;

  // one DUT per width, driven by a shared task through a generate-free pair
  logic [23:0] mi_b, mo_b;
  logic [5:0]  mi_s, mo_s;
  logic        ei, sign, cin, st;
  logic [1:0]  lc, ls, ea_b, ea_s;
  rmode_e      mode;

  ieee_round_adjust #(.N(24)) dut_b (.mode, .sign, .mant_in(mi_b), .exp_inc_in(ei),
    .lr_carry(lc), .lr_sum(ls), .cin, .sticky(st), .mant(mo_b), .exp_adj(ea_b));
  ieee_round_adjust #(.N(6)) dut_s (.mode, .sign, .mant_in(mi_s), .exp_inc_in(ei),
    .lr_carry(lc), .lr_sum(ls), .cin, .sticky(st), .mant(mo_s), .exp_adj(ea_s));

  task automatic apply(int n, u128 x, u128 y, rmode_e m, bit sg);
    u128 p, c, s, am, em, tm;
    bit  ae;
    int  ee;
    p = x * y;
    alg_ref(n, p, mode_rin(m), am, ae);
    cs_split(2 * n, p, c, s);
    mode = m;
    sign = sg;
    ei   = ae;
    lc   = c[n-1 -: 2];
    ls   = s[n-1 -: 2];
    cin  = low_carry(n - 2, c, s);
    st   = (p & mask(n - 2)) != 0;
    if (n == 24) mi_b = am[23:0];
    else         mi_s = am[5:0];
    #1;
    ieee_ref(n, p, m, sg, em, ee);
    alg_ref(n, p, 1'b1, tm, ae);
    if (m == RM_RNE && tm != em) ties++;
    if ((m == RM_RUP || m == RM_RDN) && (am != em || ee != int'(ei))) incs++;
    if ((m == RM_RUP || m == RM_RDN) && ee > int'(ei)) inc_ovf++;
    checks++;
    if ((n == 24 && (mo_b !== em[23:0] || int'(ea_b) != ee)) ||
        (n == 6  && (mo_s !== em[5:0]  || int'(ea_s) != ee))) begin
      failures++;
      if (failures <= 5)
        $display("FAIL n=%0d x=%h y=%h mode=%s sign=%0d", n, x, y, m.name(), sg);
    end
  endtask

  initial begin
    u128 x, y;
    rmode_e m;
    for (int i = 32; i < 64; i++)
      for (int j = 32; j < 64; j++)
        for (int k = 0; k < 10; k++) begin
          m = rmode_e'(k % 5);
          apply(6, u128'(i), u128'(j), m, 1'(k / 5));
        end
    for (int k = 0; k < 8000; k++) begin
      gen_operands(24, k % 4, x, y);
      m = rmode_e'($urandom_range(4));
      apply(24, x, y, m, 1'($urandom_range(1)));
    end
    // every correction must have been exercised
    checks += 3;
    if (ties == 0) failures++;
    if (incs == 0) failures++;
    if (inc_ovf == 0) failures++;
    $display("ties=%0d increments=%0d increment_overflows=%0d", ties, incs, inc_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
