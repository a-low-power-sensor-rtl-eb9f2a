// ibe_regs: host interface and internal registers of the IBE.
// An APB3 slave (the SoC's peripheral bus carries PCLK/PRESETn) holding the
// control, status, dimension, scalar and DMA registers listed in slh_pkg,
// and three 1 KB windows onto the A, B and result buffers (word address =
// row*12 + column). The register map is this design's own; the source
// design shows a host interface and "DMA and internal registers" without
// listing them.
// Timing: a write takes effect at the end of the access phase; read data is
// combinational in the access phase. While the engine or the DMA is busy,
// buffer-window accesses are held off with pready low, since the buffers are
// then in use. Writing CTRL with bit 0 set starts an operation (ignored while
// busy); STATUS.done is sticky until written with 1 and drives irq when
// enabled.
module ibe_regs
  import slh_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // APB3
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [11:0] paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr,
  output logic        irq,
  // engine control
  output logic        start,
  output ibe_mode_e   mode,
  output logic        zskip_en,
  output logic [3:0]  dim_m,
  output logic [3:0]  dim_k,
  output logic [3:0]  dim_n,
  output logic [7:0]  vlen,
  output fp32_t       scalar1,
  output fp32_t       scalar2,
  output logic [7:0]  exponent,
  output fp32_t       result,
  input  logic        busy,
  input  logic        done,
  input  logic        result_we,
  input  fp32_t       result_in,
  input  logic [31:0] cycles,
  input  logic [31:0] skips,
  // DMA control
  output logic        dma_start,
  output logic        dma_dir,
  output logic [31:0] dma_src,
  output logic [1:0]  dma_sel,
  output logic [7:0]  dma_off,
  output logic [8:0]  dma_len,
  input  logic        dma_busy,
  input  logic        dma_done,
  // host access to the buffers
  output logic        hbuf_we,
  output logic [1:0]  hbuf_sel,    // 0 A, 1 B, 2 R
  output logic [7:0]  hbuf_addr,
  output fp32_t       hbuf_wdata,
  input  fp32_t       hbuf_rdata
);
  logic       access, wr, win;
  logic       done_flag, dma_done_flag, irq_en;
  logic [31:0] ctrl_q, dim_q;

  assign win     = (paddr[11:10] != 2'b00);
  assign pready  = !(win && (busy || dma_busy));
  assign pslverr = 1'b0;
  assign access  = psel && penable && pready;
  assign wr      = access && pwrite;

  assign hbuf_sel   = paddr[11:10] - 2'd1;
  assign hbuf_addr  = paddr[9:2];
  assign hbuf_we    = wr && win;
  assign hbuf_wdata = pwdata;

  assign mode     = ibe_mode_e'(ctrl_q[6:4]);
  assign zskip_en = ctrl_q[1];
  assign dim_m    = dim_q[3:0];
  assign dim_k    = dim_q[11:8];
  assign dim_n    = dim_q[19:16];
  assign vlen     = dim_q[31:24];
  assign irq      = irq_en && done_flag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_q <= '0; dim_q <= '0; scalar1 <= FP_ZERO; scalar2 <= FP_ZERO;
      exponent <= '0; result <= FP_ZERO; irq_en <= 1'b0;
      done_flag <= 1'b0; dma_done_flag <= 1'b0;
      dma_src <= '0; dma_sel <= '0; dma_off <= '0; dma_len <= '0; dma_dir <= 1'b0;
      start <= 1'b0; dma_start <= 1'b0;
    end else begin
      start     <= 1'b0;
      dma_start <= 1'b0;
      if (done)      done_flag <= 1'b1;
      if (dma_done)  dma_done_flag <= 1'b1;
      if (result_we) result <= result_in;
      if (wr && !win) begin
        unique case (paddr)
          IBE_R_CTRL: begin
            ctrl_q <= pwdata;
            if (pwdata[0] && !busy && !dma_busy) begin
              start     <= 1'b1;
              done_flag <= 1'b0;
            end
          end
          IBE_R_STATUS: begin
            if (pwdata[1]) done_flag <= 1'b0;
            if (pwdata[3]) dma_done_flag <= 1'b0;
          end
          IBE_R_DIM:     dim_q    <= pwdata;
          IBE_R_SCALAR1: scalar1  <= pwdata;
          IBE_R_SCALAR2: scalar2  <= pwdata;
          IBE_R_EXP:     exponent <= pwdata[7:0];
          IBE_R_RESULT:  result   <= pwdata;
          IBE_R_IRQEN:   irq_en   <= pwdata[0];
          IBE_R_DMASRC:  dma_src  <= pwdata;
          IBE_R_DMABUF:  {dma_sel, dma_off} <= pwdata[9:0];
          IBE_R_DMALEN:  dma_len  <= pwdata[8:0];
          IBE_R_DMACTL: begin
            dma_dir <= pwdata[1];
            if (pwdata[0] && !busy && !dma_busy) begin
              dma_start     <= 1'b1;
              dma_done_flag <= 1'b0;
            end
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    prdata = '0;
    if (psel && !pwrite) begin
      if (win) prdata = hbuf_rdata;
      else case (paddr)
        IBE_R_CTRL:    prdata = {ctrl_q[31:1], 1'b0};
        IBE_R_STATUS:  prdata = {28'd0, dma_done_flag, dma_busy, done_flag, busy};
        IBE_R_DIM:     prdata = dim_q;
        IBE_R_SCALAR1: prdata = scalar1;
        IBE_R_SCALAR2: prdata = scalar2;
        IBE_R_EXP:     prdata = {24'd0, exponent};
        IBE_R_RESULT:  prdata = result;
        IBE_R_CYCLES:  prdata = cycles;
        IBE_R_IRQEN:   prdata = {31'd0, irq_en};
        IBE_R_SKIPS:   prdata = skips;
        IBE_R_DMASRC:  prdata = dma_src;
        IBE_R_DMABUF:  prdata = {22'd0, dma_sel, dma_off};
        IBE_R_DMALEN:  prdata = {23'd0, dma_len};
        IBE_R_DMACTL:  prdata = {30'd0, dma_dir, 1'b0};
        default:       prdata = '0;
      endcase
    end
  end

  // APB: the access phase follows a setup phase with stable control
  a_apb_setup: assert property (@(posedge clk) disable iff (!rst_n)
    (psel && !penable) |=> (psel && penable));
endmodule
