// End-to-end testbench for ieee_mult_round_top at its default size (N=24).
//
// Random operand pairs of four kinds (uniform, many trailing zeros, products
// just below 2, an all-ones operand, exact ties) are multiplied in every rounding mode and
// with both signs. The mantissa and exponent increment of all four algorithms
// must equal a direct IEEE rounding of the exact product, and the three sticky
// bits must equal the OR of the discarded low product bits. Each mechanism of
// the design is counted and must occur at least once: product overflow,
// rounding carried up to 2.0, Cin = 0 and 1, the nearest/even tie fix, a
// directed-mode increment and its carry to 2.0, the Algorithm 2 overflow
// select (A+B+1 taken), Algorithm 3 case 2 (slot bit placed at L), the
// Algorithm 3 overflow rounding bit Rv, and an exact product (sticky 0).
module tb_ieee_mult_round_top;
  import rnd_pkg::*;
  import round_ref_pkg::*;

  localparam int N = 24;
  localparam int NMECH = 11;

  logic [N-1:0]      x, y;
  logic              sign;
  rmode_e            mode;
  logic [3:0][N-1:0] mant;
  logic [3:0][1:0]   exp_adj;
  logic              sticky_cpa, sticky_tz, sticky_cs;

  int checks = 0, failures = 0;
  int mech [NMECH];
  string mech_name [NMECH] = '{"product overflow", "rounding carry to 2.0", "Cin=0", "Cin=1",
                               "nearest/even tie fix", "directed increment",
                               "directed increment to 2.0", "Alg2 selects A+B+1",
                               "Alg3 case 2 slot", "Alg3 Rv=1", "exact product"};

  ieee_mult_round_top dut (.*);

  task automatic apply(u128 xa, u128 ya, rmode_e m, bit sg);
    u128 p, em, nm, tm;
    int  ee;
    bit  ne, te, est;
    x    = xa[N-1:0];
    y    = ya[N-1:0];
    mode = m;
    sign = sg;
    #1;
    p = xa * ya;
    ieee_ref(N, p, m, sg, em, ee);
    alg_ref(N, p, 1'b1, nm, ne);
    alg_ref(N, p, 1'b0, tm, te);
    est = (p & mask(N - 2)) != 0;
    for (int a = 0; a < 4; a++) begin
      checks++;
      if (mant[a] !== em[N-1:0] || int'(exp_adj[a]) != ee) begin
        failures++;
        if (failures <= 8)
          $display("FAIL alg%0d x=%h y=%h mode=%s sign=%0d: got %h/%0d expected %h/%0d",
                   a, x, y, m.name(), sg, mant[a], exp_adj[a], em[N-1:0], ee);
      end
    end
    checks += 3;
    if (sticky_cpa !== est) failures++;
    if (sticky_tz  !== est) failures++;
    if (sticky_cs  !== est) failures++;
    // mechanisms
    if (p[2*N-1]) mech[0]++;
    if (!p[2*N-1] && ne) mech[1]++;
    if (dut.cin) mech[3]++; else mech[2]++;
    if (m == RM_RNE && nm != em) mech[4]++;
    if ((m == RM_RUP || m == RM_RDN) && (tm != em || ee != int'(te))) mech[5]++;
    if ((m == RM_RUP || m == RM_RDN) && ee > int'(te)) mech[6]++;
    if (dut.rin && dut.u_alg2a.exp_inc) mech[7]++;
    if (dut.u_alg3.slot) mech[8]++;
    if (dut.u_alg3.rv) mech[9]++;
    if (!est) mech[10]++;
  endtask

  initial begin
    u128 xa, ya;
    foreach (mech[i]) mech[i] = 0;
    for (int k = 0; k < 20000; k++) begin
      gen_operands(N, (k % 50 == 0) ? 4 : k % 4, xa, ya);
      apply(xa, ya, rmode_e'(k % 5), 1'($urandom_range(1)));
    end
    foreach (mech[i]) begin
      $display("%-28s %0d", mech_name[i], mech[i]);
      checks++;
      if (mech[i] == 0) failures++;
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
