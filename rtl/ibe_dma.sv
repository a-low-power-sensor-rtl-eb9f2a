// ibe_dma: the IBE's DMA channel. It moves len 32-bit words between system
// memory (byte address src, incrementing by 4) and one of the IBE buffers
// (A, B or R, starting at word buf_off), so the CPU does not copy operands
// and results itself. dir = 0 loads memory into the buffer, dir = 1 stores
// the buffer to memory. The source design only names a DMA next to the
// internal registers; this single-channel, one-word-at-a-time engine is this
// design's simplest reading of it.
// Memory port: mem_req is held with mem_addr/mem_we/mem_wdata until mem_gnt;
// read data returns with mem_rvalid one or more cycles after the grant, and
// only one read is outstanding. Buffer port: buf_we writes buf_wdata at
// (buf_sel, buf_addr); buf_rdata must be the combinational read of
// (buf_sel, buf_addr). busy covers the whole transfer; done pulses once.
module ibe_dma
  import slh_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        dir,
  input  logic [31:0] src,
  input  logic [1:0]  sel,
  input  logic [7:0]  buf_off,
  input  logic [8:0]  len,
  output logic        busy,
  output logic        done,
  // buffer side
  output logic [1:0]  buf_sel,
  output logic [7:0]  buf_addr,
  output logic        buf_we,
  output fp32_t       buf_wdata,
  input  fp32_t       buf_rdata,
  // memory side
  output logic        mem_req,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  input  logic        mem_gnt,
  input  logic        mem_rvalid,
  input  logic [31:0] mem_rdata
);
  typedef enum logic [1:0] {D_IDLE, D_REQ, D_WAIT} dstate_e;
  dstate_e     st;
  logic        dir_q;
  logic [31:0] src_q;
  logic [1:0]  sel_q;
  logic [7:0]  off_q;
  logic [8:0]  len_q, n_q;

  assign busy      = (st != D_IDLE);
  assign buf_sel   = sel_q;
  assign buf_addr  = off_q + n_q[7:0];
  assign buf_we    = (st == D_WAIT) && mem_rvalid;
  assign buf_wdata = mem_rdata;
  assign mem_req   = (st == D_REQ);
  assign mem_we    = dir_q;
  assign mem_addr  = src_q + {21'd0, n_q, 2'b00};
  assign mem_wdata = buf_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= D_IDLE; dir_q <= 1'b0; src_q <= '0; sel_q <= '0; off_q <= '0;
      len_q <= '0; n_q <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        D_IDLE: if (start) begin
          dir_q <= dir; src_q <= src; sel_q <= sel; off_q <= buf_off;
          len_q <= len; n_q <= '0;
          if (len == 9'd0) done <= 1'b1;
          else st <= D_REQ;
        end
        D_REQ: if (mem_gnt) begin
          if (dir_q) begin
            n_q <= n_q + 9'd1;
            if (n_q + 9'd1 == len_q) begin
              st <= D_IDLE;
              done <= 1'b1;
            end
          end else st <= D_WAIT;
        end
        D_WAIT: if (mem_rvalid) begin
          n_q <= n_q + 9'd1;
          if (n_q + 9'd1 == len_q) begin
            st <= D_IDLE;
            done <= 1'b1;
          end else st <= D_REQ;
        end
        default: st <= D_IDLE;
      endcase
    end
  end
endmodule
