// ibe_top: the Intelligence Boost Engine, a single-precision accelerator for
// the matrix kernels of Kalman-filter sensor fusion and the vector kernels
// of SVM and KNN classifiers. As in the source design it consists of a host
// interface with internal registers and a DMA, input matrix buffers (A, B),
// a zero-bit check buffer beside A, a control unit and 12 MAC processing
// elements; a result buffer R holds matrix results.
// The CPU (APB3 slave port) loads A and B either directly through the
// buffer windows or with the DMA (memory master port), writes dimensions and
// scalars, writes CTRL to start, and waits for STATUS.done or irq. Matrix
// results appear in R, scalar results (modes 4-6) in RESULT.
// Timing of each mode: see ibe_ctrl. The engine runs on the CPU clock.
module ibe_top
  import slh_pkg::*;
#(
  parameter int unsigned NPE = IBE_NPE
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [11:0] paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr,
  output logic        irq,
  output logic        mem_req,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  input  logic        mem_gnt,
  input  logic        mem_rvalid,
  input  logic [31:0] mem_rdata
);
  localparam int unsigned DIM = NPE;
  localparam int unsigned IW  = $clog2(DIM);

  logic start, zskip_en, busy, done, result_we;
  ibe_mode_e mode;
  logic [3:0] dim_m, dim_k, dim_n;
  logic [7:0] vlen, exponent;
  fp32_t scalar1, scalar2, result, result_out;
  logic [31:0] cycles, skips;
  logic dma_start, dma_dir, dma_busy, dma_done;
  logic [31:0] dma_src;
  logic [1:0]  dma_sel, dsel, hsel, wsel;
  logic [7:0]  dma_off, daddr, haddr, waddr;
  logic [8:0]  dma_len;
  logic dwe, hwe, bwe;
  fp32_t dwdata, hwdata, bwdata, rd_a, rd_b, rd_r, rd_sel;

  logic [IW-1:0] a_row_sel, a_col_sel, b_row_sel, b_col_sel, r_row_waddr;
  fp32_t [DIM-1:0] a_row, a_col, b_row, b_col, r_row_wdata, r_row_unused, r_col_unused, b_dummy;
  logic [DIM-1:0] a_nz_row;
  logic r_row_we;
  pe_op_e pe_op;
  logic  [NPE-1:0] pe_en;
  fp32_t [NPE-1:0] pe_a, pe_b, pe_acc;

  ibe_regs u_regs (
    .clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr, .irq,
    .start, .mode, .zskip_en, .dim_m, .dim_k, .dim_n, .vlen, .scalar1, .scalar2, .exponent,
    .result, .busy, .done, .result_we, .result_in(result_out), .cycles, .skips,
    .dma_start, .dma_dir, .dma_src, .dma_sel, .dma_off, .dma_len, .dma_busy, .dma_done,
    .hbuf_we(hwe), .hbuf_sel(hsel), .hbuf_addr(haddr), .hbuf_wdata(hwdata), .hbuf_rdata(rd_sel)
  );

  ibe_dma u_dma (
    .clk, .rst_n, .start(dma_start), .dir(dma_dir), .src(dma_src), .sel(dma_sel),
    .buf_off(dma_off), .len(dma_len), .busy(dma_busy), .done(dma_done),
    .buf_sel(dsel), .buf_addr(daddr), .buf_we(dwe), .buf_wdata(dwdata), .buf_rdata(rd_sel),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata
  );

  // word port of the buffers: the DMA while it runs, the host otherwise
  always_comb begin
    wsel   = dma_busy ? dsel   : hsel;
    waddr  = dma_busy ? daddr  : haddr;
    bwe    = dma_busy ? dwe    : hwe;
    bwdata = dma_busy ? dwdata : hwdata;
    unique case (wsel)
      2'd0:    rd_sel = rd_a;
      2'd1:    rd_sel = rd_b;
      2'd2:    rd_sel = rd_r;
      default: rd_sel = FP_ZERO;
    endcase
  end

  ibe_mat_buf #(.DIM(DIM)) u_buf_a (
    .clk, .rst_n, .we(bwe && wsel == 2'd0), .waddr, .wdata(bwdata),
    .row_we(1'b0), .row_waddr('0), .row_wdata(b_dummy),
    .raddr(waddr), .rdata(rd_a), .row_sel(a_row_sel), .row_data(a_row),
    .col_sel(a_col_sel), .col_data(a_col)
  );
  assign b_dummy = '0;

  ibe_zero_buf #(.DIM(DIM)) u_zero (
    .clk, .rst_n, .we(bwe && wsel == 2'd0), .waddr, .wdata(bwdata),
    .row_sel(a_row_sel), .nz_row(a_nz_row)
  );

  ibe_mat_buf #(.DIM(DIM)) u_buf_b (
    .clk, .rst_n, .we(bwe && wsel == 2'd1), .waddr, .wdata(bwdata),
    .row_we(1'b0), .row_waddr('0), .row_wdata(b_dummy),
    .raddr(waddr), .rdata(rd_b), .row_sel(b_row_sel), .row_data(b_row),
    .col_sel(b_col_sel), .col_data(b_col)
  );

  ibe_mat_buf #(.DIM(DIM)) u_buf_r (
    .clk, .rst_n, .we(bwe && wsel == 2'd2), .waddr, .wdata(bwdata),
    .row_we(r_row_we), .row_waddr(r_row_waddr), .row_wdata(r_row_wdata),
    .raddr(waddr), .rdata(rd_r), .row_sel('0), .row_data(r_row_unused),
    .col_sel('0), .col_data(r_col_unused)
  );

  ibe_ctrl #(.DIM(DIM), .NPE(NPE)) u_ctrl (
    .clk, .rst_n, .start, .mode, .zskip_en, .dim_m, .dim_k, .dim_n, .vlen,
    .scalar1, .scalar2, .exponent, .result_in(result), .busy, .done,
    .result_we, .result_out, .cycles, .skips,
    .a_row_sel, .a_col_sel, .a_row, .a_col, .a_nz_row,
    .b_row_sel, .b_col_sel, .b_row, .b_col,
    .r_row_we, .r_row_waddr, .r_row_wdata,
    .pe_op, .pe_en, .pe_a, .pe_b, .pe_acc
  );

  ibe_pe_array #(.NPE(NPE)) u_pe (
    .clk, .rst_n, .op(pe_op), .en(pe_en), .a(pe_a), .b(pe_b), .acc(pe_acc)
  );
endmodule
