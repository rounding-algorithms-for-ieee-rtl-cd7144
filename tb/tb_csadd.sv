// Self-checking testbench for csadd: exhaustive at W=5, random at W=26.
// Both outputs are compared with integer a+b and a+b+1 modulo 2^W.
module tb_csadd;
  localparam int WB = 26;
  localparam int WS = 5;
  logic [WB-1:0] ab, bb, s0b, s1b;
  logic [WS-1:0] as, bs, s0s, s1s;
  int checks = 0, failures = 0;

  csadd #(.W(WB)) dut_b (.a(ab), .b(bb), .s0(s0b), .s1(s1b));
  csadd #(.W(WS)) dut_s (.a(as), .b(bs), .s0(s0s), .s1(s1s));

  task automatic check(bit ok);
    checks++;
    if (!ok) failures++;
  endtask

  initial begin
    for (int i = 0; i < (1 << WS); i++)
      for (int j = 0; j < (1 << WS); j++) begin
        as = WS'(i);
        bs = WS'(j);
        #1;
        check(s0s == WS'(i + j));
        check(s1s == WS'(i + j + 1));
      end
    for (int k = 0; k < 5000; k++) begin
      ab = WB'($urandom());
      bb = (k % 2 == 0) ? WB'($urandom()) : ~ab;
      #1;
      check(s0b == WB'(ab + bb));
      check(s1b == WB'(ab + bb + 1'b1));
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
