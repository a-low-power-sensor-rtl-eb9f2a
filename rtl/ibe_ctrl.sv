// ibe_ctrl: control unit of the Intelligence Boost Engine.
// A single state machine sequences the seven operating modes of the source
// design on the PE array, reading operands from the A and B buffers and the
// zero-bit check buffer and writing results to the R buffer (matrices) or to
// the scalar result register (modes 4-6).
//
// Matrix products use the source design's broadcasting algorithm: for each
// row i of A, each element A[i][k] is broadcast to all PEs while PE j
// receives B[k][j] (mode 0) or B[j][k] (mode 2, A*B^T); PE j accumulates
// R[i][j]. With zero skipping enabled, elements whose zero bit is set are
// simply never broadcast: the next non-zero element of the row is found by
// a priority encoder in the same cycle, so a row costs one cycle per
// non-zero element (at least one, for an all-zero row) plus one clear and
// one write-back cycle.
//   mode 0/2: per row 2 + max(1, nnz(row)) cycles (nnz = K without skipping)
//   mode 1  : R = A^T, one column of A copied per cycle (K cycles)
//   mode 3  : R = s1 * V, 2 cycles per 12-element row
//   mode 4  : RES = RES + V1.V2 ; mode 6: RES = RES + sum (V1-V2)^2
//             1 clear, one cycle per 12-element row, NPE-1 reduction
//             cycles into PE0, one cycle adding RES, one store
//   mode 5  : RES = (s1 * (V1.V2) + s2) ^ exp, exp an integer
// Vectors of length L (1..144) are stored row-major in the buffers, 12
// elements per row. Dimensions M, K, N and L are taken at start; the host
// keeps them within 1..12 (M, K, N) and 1..144 (L).
// Handshake: a start pulse while idle begins an operation; busy is high
// until the cycle of the one-cycle done pulse. The loop order, reduction
// scheme and cycle counts are this design's choices.
module ibe_ctrl
  import slh_pkg::*;
#(
  parameter int unsigned DIM = IBE_DIM,
  parameter int unsigned NPE = IBE_NPE,
  localparam int unsigned IW = $clog2(DIM)
) (
  input  logic      clk,
  input  logic      rst_n,
  // command
  input  logic      start,
  input  ibe_mode_e mode,
  input  logic      zskip_en,
  input  logic [3:0] dim_m,
  input  logic [3:0] dim_k,
  input  logic [3:0] dim_n,
  input  logic [7:0] vlen,
  input  fp32_t     scalar1,
  input  fp32_t     scalar2,
  input  logic [7:0] exponent,
  input  fp32_t     result_in,
  output logic      busy,
  output logic      done,
  output logic      result_we,
  output fp32_t     result_out,
  output logic [31:0] cycles,
  output logic [31:0] skips,
  // buffers
  output logic [IW-1:0] a_row_sel,
  output logic [IW-1:0] a_col_sel,
  input  fp32_t [DIM-1:0] a_row,
  input  fp32_t [DIM-1:0] a_col,
  input  logic  [DIM-1:0] a_nz_row,
  output logic [IW-1:0] b_row_sel,
  output logic [IW-1:0] b_col_sel,
  input  fp32_t [DIM-1:0] b_row,
  input  fp32_t [DIM-1:0] b_col,
  output logic  r_row_we,
  output logic [IW-1:0] r_row_waddr,
  output fp32_t [DIM-1:0] r_row_wdata,
  // PE array
  output pe_op_e pe_op,
  output logic  [NPE-1:0] pe_en,
  output fp32_t [NPE-1:0] pe_a,
  output fp32_t [NPE-1:0] pe_b,
  input  fp32_t [NPE-1:0] pe_acc
);
  typedef enum logic [3:0] {
    S_IDLE, S_MM_CLR, S_MM_MAC, S_MM_WB, S_TR, S_VS, S_VS_WB,
    S_VEC_CLR, S_VEC, S_RED, S_ADDRES, S_SVM_LOAD, S_SVM_MAC, S_SVM_ONE,
    S_SVM_POW, S_STORE
  } state_e;

  state_e     state;
  ibe_mode_e  mode_q;
  logic       zskip_q;
  logic [3:0] m_q, k_q, n_q;
  logic [7:0] l_q, exp_q;
  logic [3:0] i_q;          // row / column counter
  logic [3:0] k_ptr;        // next element of the current row of A
  logic [3:0] red_q;        // reduction lane
  fp32_t      r1_q, r2_q;
  logic [3:0] nrows;        // 12-element rows of a vector

  // candidates of the current row of A from k_ptr on, and the first of them
  logic [DIM-1:0] row_mask, cand;
  logic [3:0]     kk;
  logic           have_k, have_more;
  logic [4:0]     nz_cnt;

  always_comb begin
    for (int c = 0; c < DIM; c++) begin
      row_mask[c] = (c < int'(k_q)) && (!zskip_q || a_nz_row[c]);
      cand[c]     = row_mask[c] && (c >= int'(k_ptr));
    end
    kk = '0;
    have_k = 1'b0;
    for (int c = DIM - 1; c >= 0; c--)
      if (cand[c]) begin
        kk = 4'(c);
        have_k = 1'b1;
      end
    have_more = 1'b0;
    for (int c = 0; c < DIM; c++)
      if (cand[c] && c > int'(kk)) have_more = 1'b1;
    nz_cnt = '0;
    for (int c = 0; c < DIM; c++) nz_cnt += 5'(row_mask[c]);
  end

  always_comb nrows = 4'((int'(l_q) + NPE - 1) / NPE);

  function automatic logic lane_in_vec(input logic [3:0] row, input int lane, input logic [7:0] len);
    return (int'(row) * NPE + lane) < int'(len);
  endfunction

  // datapath drive
  always_comb begin
    a_row_sel   = IW'(i_q);
    a_col_sel   = IW'(i_q);
    b_row_sel   = IW'(kk);
    b_col_sel   = IW'(kk);
    r_row_we    = 1'b0;
    r_row_waddr = IW'(i_q);
    r_row_wdata = '0;
    pe_op = PE_NOP;
    pe_en = '0;
    pe_a  = '0;
    pe_b  = '0;
    result_we  = 1'b0;
    result_out = pe_acc[0];
    unique case (state)
      S_MM_CLR, S_VEC_CLR: begin
        pe_op = PE_CLR;
        pe_en = '1;
      end
      S_MM_MAC: begin
        pe_op = PE_MAC;
        for (int j = 0; j < NPE; j++) begin
          pe_en[j] = have_k && (j < int'(n_q));
          pe_a[j]  = a_row[kk];
          pe_b[j]  = (mode_q == IBE_MMT) ? b_col[j] : b_row[j];
        end
      end
      S_MM_WB: begin
        r_row_we = 1'b1;
        for (int j = 0; j < NPE; j++) r_row_wdata[j] = (j < int'(n_q)) ? pe_acc[j] : FP_ZERO;
      end
      S_TR: begin
        r_row_we = 1'b1;
        for (int j = 0; j < NPE; j++) r_row_wdata[j] = (j < int'(m_q)) ? a_col[j] : FP_ZERO;
      end
      S_VS: begin
        pe_op = PE_MUL;
        pe_en = '1;
        for (int j = 0; j < NPE; j++) begin
          pe_a[j] = scalar1;
          pe_b[j] = a_row[j];
        end
      end
      S_VS_WB: begin
        r_row_we = 1'b1;
        for (int j = 0; j < NPE; j++) r_row_wdata[j] = lane_in_vec(i_q, j, l_q) ? pe_acc[j] : FP_ZERO;
      end
      S_VEC: begin
        b_row_sel = IW'(i_q);
        pe_op = (mode_q == IBE_KNN) ? PE_SQD : PE_MAC;
        for (int j = 0; j < NPE; j++) begin
          pe_en[j] = lane_in_vec(i_q, j, l_q);
          pe_a[j]  = a_row[j];
          pe_b[j]  = b_row[j];
        end
      end
      S_RED: begin
        pe_op = PE_MAC;
        pe_en[0] = 1'b1;
        pe_a[0]  = FP_ONE;
        pe_b[0]  = pe_acc[red_q];
      end
      S_ADDRES: begin
        pe_op = PE_MAC;
        pe_en[0] = 1'b1;
        pe_a[0]  = FP_ONE;
        pe_b[0]  = result_in;
      end
      S_SVM_LOAD: begin
        pe_op = PE_LOAD;
        pe_en[0] = 1'b1;
        pe_b[0]  = scalar2;
      end
      S_SVM_MAC: begin
        pe_op = PE_MAC;
        pe_en[0] = 1'b1;
        pe_a[0]  = scalar1;
        pe_b[0]  = r1_q;
      end
      S_SVM_ONE: begin
        pe_op = PE_LOAD;
        pe_en[0] = 1'b1;
        pe_b[0]  = FP_ONE;
      end
      S_SVM_POW: begin
        pe_op = PE_MULACC;
        pe_en[0] = (exp_q != 8'd0);
        pe_a[0]  = r2_q;
      end
      S_STORE: result_we = 1'b1;
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      mode_q  <= IBE_MM;
      zskip_q <= 1'b0;
      {m_q, k_q, n_q} <= '0;
      l_q     <= '0;
      exp_q   <= '0;
      i_q     <= '0;
      k_ptr   <= '0;
      red_q   <= '0;
      r1_q    <= FP_ZERO;
      r2_q    <= FP_ZERO;
      done    <= 1'b0;
      cycles  <= '0;
      skips   <= '0;
    end else begin
      done <= 1'b0;
      if (busy) cycles <= cycles + 32'd1;
      unique case (state)
        S_IDLE: if (start) begin
          mode_q  <= mode;
          zskip_q <= zskip_en;
          m_q <= dim_m; k_q <= dim_k; n_q <= dim_n;
          l_q <= vlen;  exp_q <= exponent;
          i_q <= '0;
          cycles <= '0;
          skips  <= '0;
          unique case (mode)
            IBE_MM, IBE_MMT: state <= S_MM_CLR;
            IBE_TR:          state <= S_TR;
            IBE_VS:          state <= S_VS;
            IBE_DOT, IBE_SVM, IBE_KNN: state <= S_VEC_CLR;
            default: begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          endcase
        end
        S_MM_CLR: begin
          k_ptr <= '0;
          state <= S_MM_MAC;
        end
        S_MM_MAC: begin
          if (have_k) k_ptr <= kk + 4'd1;
          if (!have_more) state <= S_MM_WB;
        end
        S_MM_WB: begin
          skips <= skips + 32'(int'(k_q) - int'(nz_cnt));
          i_q   <= i_q + 4'd1;
          if (i_q + 4'd1 >= m_q) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else state <= S_MM_CLR;
        end
        S_TR: begin
          i_q <= i_q + 4'd1;
          if (i_q + 4'd1 >= k_q) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        S_VS: state <= S_VS_WB;
        S_VS_WB: begin
          i_q <= i_q + 4'd1;
          if (i_q + 4'd1 >= nrows) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else state <= S_VS;
        end
        S_VEC_CLR: state <= S_VEC;
        S_VEC: begin
          i_q <= i_q + 4'd1;
          if (i_q + 4'd1 >= nrows) begin
            red_q <= 4'd1;
            state <= S_RED;
          end
        end
        S_RED: begin
          red_q <= red_q + 4'd1;
          if (int'(red_q) + 1 >= NPE)
            state <= (mode_q == IBE_SVM) ? S_SVM_LOAD : S_ADDRES;
        end
        S_ADDRES: state <= S_STORE;
        S_SVM_LOAD: begin
          r1_q  <= pe_acc[0];
          state <= S_SVM_MAC;
        end
        S_SVM_MAC: state <= S_SVM_ONE;
        S_SVM_ONE: begin
          r2_q  <= pe_acc[0];
          state <= S_SVM_POW;
        end
        S_SVM_POW: begin
          if (exp_q == 8'd0) state <= S_STORE;
          else exp_q <= exp_q - 8'd1;
        end
        S_STORE: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a started operation always ends
  property p_done_ends_busy;
    @(posedge clk) disable iff (!rst_n) done |-> !busy;
  endproperty
  a_done_ends_busy: assert property (p_done_ends_busy);
endmodule
