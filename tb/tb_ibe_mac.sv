// tb_ibe_mac: drives one IBE processing element with random operation
// sequences on small integer-valued operands (so every result is exact) and
// compares the accumulator after each clock with a double-precision model.
module tb_ibe_mac;
  import slh_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0, en;
  pe_op_e op;
  fp32_t a, b, acc;
  real model;
  int checks = 0, failures = 0, cyc = 0;
  int opcount [7];

  ibe_mac dut (.clk, .rst_n, .op, .en, .a, .b, .acc);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp32_t add_res(input real r);
    return (r == 0.0) ? 32'h0 : r2f(r);
  endfunction

  initial begin
    fp32_t expv;
    op = PE_NOP; en = 0; a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    model = 0.0;
    checks++;
    if (acc !== 32'h0) begin failures++; $display("FAIL reset value %h", acc); end
    for (int i = 0; i < 3000; i++) begin
      op = (i % 6 == 0) ? PE_CLR : pe_op_e'($urandom_range(0, 6));
      en = ($urandom_range(0, 9) != 0);
      a  = rand_int_f(4);
      b  = rand_int_f(4);
      expv = r2f(model);
      if (en) begin
        opcount[int'(op)]++;
        unique case (op)
          PE_CLR:    expv = 32'h0;
          PE_LOAD:   expv = b;
          PE_MAC:    expv = add_res(model + f2r(a) * f2r(b));
          PE_MUL:    expv = r2f(f2r(a) * f2r(b));
          PE_SQD:    expv = add_res(model + (f2r(a) - f2r(b)) * (f2r(a) - f2r(b)));
          PE_MULACC: expv = r2f(model * f2r(a));
          default:   expv = acc;
        endcase
        if (op == PE_NOP) expv = acc;
      end else expv = acc;
      @(negedge clk);
      checks++;
      if (acc !== expv && !(acc[30:0] == 0 && expv[30:0] == 0)) begin  // zero sign not compared
        failures++;
        if (failures < 10) $display("FAIL op %s en %0d a %h b %h: acc %h expected %h", op.name(), en, a, b, acc, expv);
      end
      model = f2r(acc);
      if (model > 1.0e6 || model < -1.0e6) begin
        op = PE_CLR; en = 1; @(negedge clk); model = 0.0;
      end
    end
    for (int k = 1; k < 7; k++) begin
      checks++;
      if (opcount[k] == 0) begin failures++; $display("FAIL op %0d never exercised", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
