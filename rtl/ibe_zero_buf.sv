// ibe_zero_buf: the zero-bit check buffer of the IBE. The source design
// detects zero elements of operand matrix A and skips their multiplication
// step; this buffer keeps one flag per element of A, updated whenever a word
// is written into the A buffer (same write port, same clock edge), so the
// control unit can read the non-zero flags of a whole row of A in one cycle
// and jump straight to the next non-zero element. Both +0.0 and -0.0 count as
// zero (this design's choice). After reset every element reads as zero,
// matching the reset value of the A buffer.
module ibe_zero_buf
  import slh_pkg::*;
#(
  parameter int unsigned DIM = IBE_DIM,
  localparam int unsigned AW = $clog2(DIM * DIM),
  localparam int unsigned IW = $clog2(DIM)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  we,
  input  logic [AW-1:0] waddr,
  input  fp32_t wdata,
  input  logic [IW-1:0] row_sel,
  output logic [DIM-1:0] nz_row      // bit c set: A[row_sel][c] is not zero
);
  logic [DIM*DIM-1:0] nz;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) nz <= '0;
    else if (we && waddr < AW'(DIM * DIM)) nz[waddr] <= (wdata[30:0] != 31'd0);
  end

  always_comb begin
    for (int c = 0; c < DIM; c++)
      nz_row[c] = (row_sel < IW'(DIM)) ? nz[int'(row_sel) * DIM + c] : 1'b0;
  end
endmodule
