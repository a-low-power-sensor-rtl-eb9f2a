// tb_ibe_ctrl: runs the IBE control unit with the PE array and the A, B,
// zero-bit and result buffers (loaded directly through their word ports)
// in all seven modes, with sparse integer-valued operands so results are
// exact. Results are compared with a double-precision model, and the number
// of busy cycles with the cycle formula of each mode, including zero
// skipping (fewer cycles for sparse rows of A).
module tb_ibe_ctrl;
  import slh_pkg::*;
  import tb_fp_pkg::*;
  localparam int D = IBE_DIM;
  logic clk = 0, rst_n = 0;

  // command
  logic start = 0, zskip_en = 0, busy, done, result_we;
  ibe_mode_e mode;
  logic [3:0] dim_m, dim_k, dim_n;
  logic [7:0] vlen, exponent;
  fp32_t scalar1, scalar2, result_reg, result_out;
  logic [31:0] cycles, skips;
  // buffers
  logic a_we = 0, b_we = 0;
  logic [7:0] waddr;
  fp32_t wdata, rd_a, rd_b, rd_r;
  logic [7:0] r_raddr;
  logic [3:0] a_row_sel, a_col_sel, b_row_sel, b_col_sel, r_row_waddr;
  fp32_t [D-1:0] a_row, a_col, b_row, b_col, r_row_wdata, zero_row, r_u1, r_u2;
  logic [D-1:0] a_nz_row;
  logic r_row_we;
  pe_op_e pe_op;
  logic  [D-1:0] pe_en;
  fp32_t [D-1:0] pe_a, pe_b, pe_acc;

  int checks = 0, failures = 0, cyc = 0;
  int busy_cycles;
  int modes_run [7];
  real ma [D*D], mb [D*D];

  assign zero_row = '0;

  ibe_mat_buf u_a (.clk, .rst_n, .we(a_we), .waddr, .wdata, .row_we(1'b0), .row_waddr(4'd0),
    .row_wdata(zero_row), .raddr(waddr), .rdata(rd_a), .row_sel(a_row_sel), .row_data(a_row),
    .col_sel(a_col_sel), .col_data(a_col));
  ibe_zero_buf u_z (.clk, .rst_n, .we(a_we), .waddr, .wdata, .row_sel(a_row_sel), .nz_row(a_nz_row));
  ibe_mat_buf u_b (.clk, .rst_n, .we(b_we), .waddr, .wdata, .row_we(1'b0), .row_waddr(4'd0),
    .row_wdata(zero_row), .raddr(waddr), .rdata(rd_b), .row_sel(b_row_sel), .row_data(b_row),
    .col_sel(b_col_sel), .col_data(b_col));
  ibe_mat_buf u_r (.clk, .rst_n, .we(1'b0), .waddr, .wdata, .row_we(r_row_we), .row_waddr(r_row_waddr),
    .row_wdata(r_row_wdata), .raddr(r_raddr), .rdata(rd_r), .row_sel(4'd0), .row_data(r_u1),
    .col_sel(4'd0), .col_data(r_u2));

  ibe_ctrl dut (
    .clk, .rst_n, .start, .mode, .zskip_en, .dim_m, .dim_k, .dim_n, .vlen, .scalar1, .scalar2,
    .exponent, .result_in(result_reg), .busy, .done, .result_we, .result_out, .cycles, .skips,
    .a_row_sel, .a_col_sel, .a_row, .a_col, .a_nz_row, .b_row_sel, .b_col_sel, .b_row, .b_col,
    .r_row_we, .r_row_waddr, .r_row_wdata, .pe_op, .pe_en, .pe_a, .pe_b, .pe_acc);

  ibe_pe_array u_pe (.clk, .rst_n, .op(pe_op), .en(pe_en), .a(pe_a), .b(pe_b), .acc(pe_acc));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (result_we) result_reg <= result_out;
  end

  initial begin
    wait (cyc == 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // fill A and B with integers in [-3,3]; A has about the given percentage of zeros
  task automatic load(input int zero_pct);
    for (int i = 0; i < D * D; i++) begin
      ma[i] = ($urandom_range(0, 99) < zero_pct) ? 0.0 : real'(int'($urandom_range(1, 6)) - (($urandom & 1) ? 7 : 0) + 3) ;
      if (ma[i] > 3.0) ma[i] = ma[i] - 3.0;
      mb[i] = real'(int'($urandom_range(0, 6)) - 3);
      @(negedge clk);
      a_we = 1; b_we = 1; waddr = 8'(i);
      wdata = r2f(ma[i]);
      @(negedge clk);
      a_we = 0; b_we = 0;
    end
    // B needs its own data: write it separately
    for (int i = 0; i < D * D; i++) begin
      b_we = 1; waddr = 8'(i); wdata = r2f(mb[i]);
      @(negedge clk);
    end
    b_we = 0;
  endtask

  task automatic run(input ibe_mode_e m, input int mm, input int kk, input int nn, input int l,
                     input logic zs, input fp32_t s1, input fp32_t s2, input int e);
    mode = m; dim_m = 4'(mm); dim_k = 4'(kk); dim_n = 4'(nn); vlen = 8'(l); zskip_en = zs;
    scalar1 = s1; scalar2 = s2; exponent = 8'(e);
    start = 1;
    @(negedge clk);
    start = 0;
    busy_cycles = 0;
    while (!done) begin
      if (busy) busy_cycles++;
      @(negedge clk);
    end
    modes_run[int'(m)]++;
  endtask

  function automatic fp32_t rres(input int r, input int c);
    return u_r.mem[r * D + c];
  endfunction

  initial begin
    int exp_cyc, nnz;
    real acc, r1, r2, r3;
    mode = IBE_MM; dim_m = 0; dim_k = 0; dim_n = 0; vlen = 0; scalar1 = 0; scalar2 = 0; exponent = 0;
    waddr = 0; wdata = 0; r_raddr = 0; result_reg = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    for (int t = 0; t < 6; t++) begin
      int mm, kk, nn;
      logic zs;
      mm = (t < 2) ? D : int'($urandom_range(1, D));
      kk = (t < 2) ? D : int'($urandom_range(1, D));
      nn = (t < 2) ? D : int'($urandom_range(1, D));
      zs = (t % 2 == 0);
      load(56);
      // mode 0: A * B
      run(IBE_MM, mm, kk, nn, 0, zs, 0, 0, 0);
      exp_cyc = 0;
      for (int i = 0; i < mm; i++) begin
        nnz = 0;
        for (int k = 0; k < kk; k++) if (!zs || ma[i * D + k] != 0.0) nnz++;
        exp_cyc += 2 + ((nnz == 0) ? 1 : nnz);
        for (int j = 0; j < nn; j++) begin
          acc = 0.0;
          for (int k = 0; k < kk; k++) acc += ma[i * D + k] * mb[k * D + j];
          chk(f2r(rres(i, j)) == acc, $sformatf("mode0 R[%0d][%0d]=%h exp %f", i, j, rres(i, j), acc));
        end
      end
      chk(busy_cycles == exp_cyc, $sformatf("mode0 cycles %0d exp %0d", busy_cycles, exp_cyc));
      // mode 2: A * B^T
      run(IBE_MMT, mm, kk, nn, 0, zs, 0, 0, 0);
      for (int i = 0; i < mm; i++)
        for (int j = 0; j < nn; j++) begin
          acc = 0.0;
          for (int k = 0; k < kk; k++) acc += ma[i * D + k] * mb[j * D + k];
          chk(f2r(rres(i, j)) == acc, $sformatf("mode2 R[%0d][%0d]=%h exp %f", i, j, rres(i, j), acc));
        end
      chk(busy_cycles == exp_cyc, $sformatf("mode2 cycles %0d exp %0d", busy_cycles, exp_cyc));
      // mode 1: A^T (A is mm x kk, R is kk x mm)
      run(IBE_TR, mm, kk, nn, 0, zs, 0, 0, 0);
      for (int c = 0; c < kk; c++)
        for (int r = 0; r < mm; r++)
          chk(f2r(rres(c, r)) == ma[r * D + c], $sformatf("mode1 R[%0d][%0d]", c, r));
      chk(busy_cycles == kk, $sformatf("mode1 cycles %0d exp %0d", busy_cycles, kk));
    end

    for (int t = 0; t < 6; t++) begin
      int l, rows, e;
      real s1, s2;
      l = (t == 0) ? D * D : int'($urandom_range(1, D * D));
      rows = (l + D - 1) / D;
      load(30);
      // mode 3: V * s
      s1 = real'(int'($urandom_range(0, 8)) - 4) / 2.0;
      run(IBE_VS, 0, 0, 0, l, 0, r2f(s1), 0, 0);
      for (int i = 0; i < l; i++)
        chk(f2r(u_r.mem[i]) == ma[i] * s1, $sformatf("mode3 R[%0d]", i));
      chk(busy_cycles == 2 * rows, $sformatf("mode3 cycles %0d exp %0d", busy_cycles, 2 * rows));
      // mode 4: RES += V1 . V2
      acc = f2r(result_reg);
      for (int i = 0; i < l; i++) acc += ma[i] * mb[i];
      run(IBE_DOT, 0, 0, 0, l, 0, 0, 0, 0);
      chk(f2r(result_reg) == acc, $sformatf("mode4 RES %h exp %f", result_reg, acc));
      chk(busy_cycles == rows + D + 2, $sformatf("mode4 cycles %0d exp %0d", busy_cycles, rows + D + 2));
      // mode 6: RES += sum (V1 - V2)^2
      acc = f2r(result_reg);
      for (int i = 0; i < l; i++) acc += (ma[i] - mb[i]) ** 2;
      run(IBE_KNN, 0, 0, 0, l, 0, 0, 0, 0);
      chk(f2r(result_reg) == acc, $sformatf("mode6 RES %h exp %f", result_reg, acc));
      chk(busy_cycles == rows + D + 2, $sformatf("mode6 cycles %0d", busy_cycles));
      // mode 5: (s1 * (V1 . V2) + s2) ^ e
      r1 = 0.0;
      for (int i = 0; i < l; i++) r1 += ma[i] * mb[i];
      s1 = 0.0625;
      s2 = real'(int'($urandom_range(0, 4)));
      e  = t % 4;
      r2 = s1 * r1 + s2;
      r3 = 1.0;
      for (int k = 0; k < e; k++) r3 = r3 * r2;
      run(IBE_SVM, 0, 0, 0, l, 0, r2f(s1), r2f(s2), e);
      chk(result_reg == r2f(r3) || (result_reg[30:0] == 0 && r3 == 0.0),
          $sformatf("mode5 RES %h exp %f (%h)", result_reg, r3, r2f(r3)));
      chk(busy_cycles == rows + e + 17, $sformatf("mode5 cycles %0d exp %0d", busy_cycles, rows + e + 17));
    end
    for (int m = 0; m < 7; m++) chk(modes_run[m] > 0, $sformatf("mode %0d never run", m));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
