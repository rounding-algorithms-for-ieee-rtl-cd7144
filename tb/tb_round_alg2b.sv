// Self-checking testbench for round_alg2b: exhaustive at N=6, random operands
// (uniform, exact/tie, near-2 products, all-ones) at the default N=24.
// Both nearest/up and truncation are checked against an exact-product model.
module tb_round_alg2b;
  int  c0, f0, c1, f1;
  bit  d0, d1;

  alg_harness #(.N(6), .ALG(2), .EXHAUSTIVE(1'b1)) h_small (.checks(c0), .failures(f0), .done(d0));
  alg_harness #(.N(24), .ALG(2), .VECTORS(4000))   h_full  (.checks(c1), .failures(f1), .done(d1));

  initial begin
    wait (d0 && d1);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end

  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end
endmodule
