// ibe_mac: one processing element (PE) of the Intelligence Boost Engine.
// A single-precision multiply-accumulate unit with a 32-bit accumulator.
// Besides the plain MAC used by matrix and vector modes, it offers the steps
// the source design's SVM-polynomial and KNN modes are built from:
//   PE_CLR    acc = 0            PE_LOAD   acc = b
//   PE_MAC    acc = acc + a*b    PE_MUL    acc = a*b
//   PE_SQD    acc = acc + (a-b)^2   (KNN distance term)
//   PE_MULACC acc = acc * a          (power step of the SVM polynomial)
// The operation takes effect at the rising clock edge when en is set; the
// new accumulator is visible the next cycle (one operation per cycle, no
// pipeline). The operation set and single-cycle timing are this design's
// choices: the source design only says each PE is a MAC.
module ibe_mac
  import slh_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  pe_op_e op,
  input  logic   en,
  input  fp32_t  a,
  input  fp32_t  b,
  output fp32_t  acc
);
  fp32_t diff, mul_x, mul_y, prod, add_x, add_y, sum, nxt;

  // operand selection for the shared multiplier and accumulate adder
  always_comb begin
    mul_x = a;
    mul_y = b;
    if (op == PE_SQD) begin
      mul_x = diff;
      mul_y = diff;
    end else if (op == PE_MULACC) begin
      mul_y = acc;
    end
    add_x = acc;
    add_y = prod;
  end

  fp32_add u_sub (.a(a), .b(b), .sub(1'b1), .y(diff));
  fp32_mul u_mul (.a(mul_x), .b(mul_y), .y(prod));
  fp32_add u_acc (.a(add_x), .b(add_y), .sub(1'b0), .y(sum));

  always_comb begin
    unique case (op)
      PE_CLR:               nxt = FP_ZERO;
      PE_LOAD:              nxt = b;
      PE_MAC, PE_SQD:       nxt = sum;
      PE_MUL, PE_MULACC:    nxt = prod;
      default:              nxt = acc;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= FP_ZERO;
    else if (en) acc <= nxt;
  end
endmodule
