// ibe_mat_buf: one DIM x DIM single-precision matrix buffer of the IBE
// (the source design's input matrix buffers; the same module holds the
// result matrix). Element (r,c) lives at word address r*DIM + c.
// Writes: a word port (host or DMA) and a whole-row port (result write-back
// from the PE array); both take effect at the clock edge, the row port first
// and the word port after it if both hit the same element.
// Reads are combinational: one word, one whole row and one whole column per
// cycle, so the control unit can broadcast a row of B, or for A*B^T a
// column of B, to all PEs at once. A flip-flop array is this design's
// choice; it is what makes row and column reads both single-cycle.
module ibe_mat_buf
  import slh_pkg::*;
#(
  parameter int unsigned DIM = IBE_DIM,
  localparam int unsigned AW = $clog2(DIM * DIM),
  localparam int unsigned IW = $clog2(DIM)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   we,
  input  logic  [AW-1:0] waddr,
  input  fp32_t  wdata,
  input  logic   row_we,
  input  logic  [IW-1:0] row_waddr,
  input  fp32_t [DIM-1:0] row_wdata,
  input  logic  [AW-1:0] raddr,
  output fp32_t  rdata,
  input  logic  [IW-1:0] row_sel,
  output fp32_t [DIM-1:0] row_data,
  input  logic  [IW-1:0] col_sel,
  output fp32_t [DIM-1:0] col_data
);
  fp32_t mem [DIM*DIM];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DIM * DIM; i++) mem[i] <= FP_ZERO;
    end else begin
      if (row_we && row_waddr < IW'(DIM))
        for (int c = 0; c < DIM; c++) mem[int'(row_waddr) * DIM + c] <= row_wdata[c];
      if (we && waddr < AW'(DIM * DIM))
        mem[waddr] <= wdata;
    end
  end

  always_comb begin
    rdata = (raddr < AW'(DIM * DIM)) ? mem[raddr] : FP_ZERO;
    for (int c = 0; c < DIM; c++) begin
      row_data[c] = (row_sel < IW'(DIM)) ? mem[int'(row_sel) * DIM + c] : FP_ZERO;
      col_data[c] = (col_sel < IW'(DIM)) ? mem[c * DIM + int'(col_sel)] : FP_ZERO;
    end
  end
endmodule
