// tb_ibe_pe_array: random operations on all 12 lanes at once, each lane with
// its own operands and enable, checked lane by lane against a model.
module tb_ibe_pe_array;
  import slh_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = IBE_NPE;
  logic clk = 0, rst_n = 0;
  pe_op_e op;
  logic  [N-1:0] en;
  fp32_t [N-1:0] a, b, acc;
  real model [N];
  int checks = 0, failures = 0, cyc = 0;

  ibe_pe_array dut (.clk, .rst_n, .op, .en, .a, .b, .acc);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r;
    fp32_t e [N];
    op = PE_NOP; en = '0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    op = PE_CLR; en = '1; @(negedge clk);
    for (int j = 0; j < N; j++) model[j] = 0.0;
    for (int i = 0; i < 600; i++) begin
      op = (i % 5 == 0) ? PE_CLR : pe_op_e'($urandom_range(2, 5));
      for (int j = 0; j < N; j++) begin
        en[j] = 1'($urandom);
        a[j] = rand_int_f(5);
        b[j] = rand_int_f(5);
        r = model[j];
        if (en[j]) unique case (op)
          PE_CLR:  r = 0.0;
          PE_LOAD: r = f2r(b[j]);
          PE_MAC:  r = model[j] + f2r(a[j]) * f2r(b[j]);
          PE_MUL:  r = f2r(a[j]) * f2r(b[j]);
          PE_SQD:  r = model[j] + (f2r(a[j]) - f2r(b[j])) ** 2;
          default: ;
        endcase
        model[j] = r;
      end
      @(negedge clk);
      for (int j = 0; j < N; j++) begin
        checks++;
        if (f2r(acc[j]) != model[j]) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d op %s: %h expected %f", j, op.name(), acc[j], model[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
