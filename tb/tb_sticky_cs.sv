// Self-checking testbench for sticky_cs (N=24): carry-save products from the non-recoded array multiplier.
// The expected sticky bit is the OR of bits N-3..0 of the exact product x*y.
module tb_sticky_cs;
  import round_ref_pkg::*;

  localparam int N = 24;
  u128 x, y, c, s;
  logic [2*N-1:0] ca, sa;
  logic           st;
  int checks = 0, failures = 0, zeros = 0;

  csa_array_mult #(.N(N)) src (.x(x[N-1:0]), .y(y[N-1:0]), .inject(1'b0), .carry(ca), .sum(sa));
  sticky_cs #(.N(N)) dut (.carry_lo(ca[N-3:0]), .sum_lo(sa[N-3:0]), .sticky(st));

  initial begin
    bit e;
    for (int k = 0; k < 6000; k++) begin
      gen_operands(N, (k % 2 == 0) ? 1 : k % 4, x, y);
      cs_split(2 * N, x * y, c, s);
      #1;
      e = ((x * y) & mask(N - 2)) != 0;
      zeros += int'(!e);
      checks++;
      if (st !== e) begin
        failures++;
        if (failures <= 5) $display("FAIL x=%h y=%h sticky=%0d", x, y, st);
      end
    end
    checks++;
    if (zeros == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
