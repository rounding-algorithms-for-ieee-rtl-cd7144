// Self-checking testbench for lsb_carry (N=24): random carry/sum pairs plus
// pairs built to propagate a carry through every column, compared with a
// wide integer addition.
module tb_lsb_carry;
  import round_ref_pkg::*;

  localparam int N = 24;
  logic [N-3:0] c, s;
  logic         cin;
  int checks = 0, failures = 0, ones = 0;

  lsb_carry #(.N(N)) dut (.carry_lo(c), .sum_lo(s), .cin(cin));

  initial begin
    u128 a, b;
    for (int k = 0; k < 5000; k++) begin
      a = rand128() & mask(N - 2);
      case (k % 3)
        0: b = rand128() & mask(N - 2);
        1: b = (~a) & mask(N - 2);                  // all propagate
        default: b = ((~a) + 1) & mask(N - 2);      // carry rippled from bit 0
      endcase
      c = a[N-3:0];
      s = b[N-3:0];
      #1;
      checks++;
      ones += int'(cin);
      if (cin !== low_carry(N - 2, a, b)) begin
        failures++;
        if (failures <= 5) $display("FAIL c=%h s=%h cin=%0d", c, s, cin);
      end
    end
    checks++;
    if (ones == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
