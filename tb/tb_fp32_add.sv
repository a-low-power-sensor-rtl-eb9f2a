// tb_fp32_add: checks the single-precision adder/subtractor against double
// precision sums truncated to single precision (round toward zero), with
// random operands of nearby and distant exponents, cancellation and special
// values.
module tb_fp32_add;
  import tb_fp_pkg::*;
  logic [31:0] a, b, y;
  logic sub;
  int checks = 0, failures = 0;

  fp32_add dut (.a, .b, .sub, .y);

  task automatic check(input logic [31:0] exp_y, input string what);
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL %s: %h %s %h = %h, expected %h", what, a, sub ? "-" : "+", b, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r;
    for (int i = 0; i < 3000; i++) begin
      a = rand_f(-3, 3);
      b = (i % 3 == 0) ? rand_f(-3, 3) : rand_f(-25, 25);
      if (i % 7 == 0) b = {~a[31], a[30:4], 4'($urandom)};   // heavy cancellation
      sub = 1'($urandom);
      r = sub ? f2r(a) - f2r(b) : f2r(a) + f2r(b);
      check((r == 0.0) ? 32'h0 : r2f(r), "random");
    end
    sub = 0;
    a = 32'h3f80_0000; b = 32'hbf80_0000; check(32'h0000_0000, "1-1");
    a = 32'h7f80_0000; b = 32'h3f80_0000; check(32'h7f80_0000, "inf+1");
    a = 32'h7f80_0000; b = 32'hff80_0000; check(32'h7fc0_0000, "inf-inf");
    a = 32'h7f7f_ffff; b = 32'h7f7f_ffff; check(32'h7f80_0000, "overflow");
    a = 32'h0000_0000; b = 32'h4040_0000; check(32'h4040_0000, "0+3");
    a = 32'h4b80_0000; b = 32'h3f80_0000; sub = 1; check(32'h4b7f_ffff, "2^24-1 truncated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
