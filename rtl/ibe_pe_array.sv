// ibe_pe_array: the IBE's array of NPE processing elements (12 in the source
// design). All PEs execute the same operation each cycle; each has its own
// enable and its own operand pair. Broadcasting, the core of the source
// design's matrix algorithm, is done by the control unit driving the same
// value on every a lane while the b lanes carry a row or column of B.
// Timing: as ibe_mac, one operation per clock, results the next cycle.
module ibe_pe_array
  import slh_pkg::*;
#(
  parameter int unsigned NPE = IBE_NPE
) (
  input  logic   clk,
  input  logic   rst_n,
  input  pe_op_e op,
  input  logic  [NPE-1:0] en,
  input  fp32_t [NPE-1:0] a,
  input  fp32_t [NPE-1:0] b,
  output fp32_t [NPE-1:0] acc
);
  for (genvar g = 0; g < NPE; g++) begin : g_pe
    ibe_mac u_mac (
      .clk, .rst_n, .op, .en(en[g]), .a(a[g]), .b(b[g]), .acc(acc[g])
    );
  end
endmodule
