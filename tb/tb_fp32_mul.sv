// tb_fp32_mul: checks the single-precision multiplier against products
// computed in double precision and truncated, over random operands, plus
// zero, infinity, NaN, overflow and underflow cases.
module tb_fp32_mul;
  import tb_fp_pkg::*;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp32_mul dut (.a, .b, .y);

  task automatic check(input logic [31:0] exp_y, input string what);
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL %s: %h * %h = %h, expected %h", what, a, b, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = rand_f(-20, 20);
      b = rand_f(-20, 20);
      check(r2f(f2r(a) * f2r(b)), "random");
    end
    a = 32'h4040_0000; b = 32'h0000_0000; check(32'h0000_0000, "3*0");
    a = 32'hc040_0000; b = 32'h0000_0000; check(32'h8000_0000, "-3*0");
    a = 32'h7f80_0000; b = 32'h4000_0000; check(32'h7f80_0000, "inf*2");
    a = 32'h7f80_0000; b = 32'h0000_0000; check(32'h7fc0_0000, "inf*0");
    a = 32'h7fc0_0001; b = 32'h3f80_0000; check(32'h7fc0_0000, "nan*1");
    a = 32'h7f00_0000; b = 32'h7f00_0000; check(32'h7f80_0000, "overflow");
    a = 32'h0100_0000; b = 32'h0100_0000; check(32'h0000_0000, "underflow");
    a = 32'h3fc0_0000; b = 32'h3fc0_0000; check(32'h4010_0000, "1.5*1.5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
