// tb_ibe_top: the whole IBE driven as the CPU would: operands placed in a
// system-memory model, loaded with the DMA, every mode started through the
// APB registers, matrix results read through the R window and stored back
// with the DMA, scalar results read from RESULT. Integer-valued sparse
// operands keep the reference exact. Also checks the CYCLES and SKIPS
// registers for a 12x12 product with zero skipping, and the done interrupt.
module tb_ibe_top;
  import slh_pkg::*;
  import tb_fp_pkg::*;
  localparam int D = IBE_DIM;
  logic clk = 0, rst_n = 0;
  logic psel = 0, penable = 0, pwrite = 0, pready, pslverr, irq;
  logic [11:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  logic mem_req, mem_we, mem_gnt, mem_rvalid = 0;
  logic [31:0] mem_addr, mem_wdata, mem_rdata = 0;
  logic [31:0] mem [1024];
  real ma [D*D], mb [D*D];
  int checks = 0, failures = 0, cyc = 0, irqs = 0;

  ibe_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (irq) irqs++;
  end

  initial begin
    wait (cyc == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory: always grants, read data one cycle later
  assign mem_gnt = mem_req;
  always @(posedge clk) begin
    mem_rvalid <= mem_req && !mem_we;
    if (mem_req && !mem_we) mem_rdata <= mem[mem_addr[11:2]];
    if (mem_req && mem_we) mem[mem_addr[11:2]] <= mem_wdata;
  end

  task automatic apb_write(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk);
    psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk);
    penable = 1;
    while (!pready) @(negedge clk);
    @(negedge clk);
    psel = 0; penable = 0;
  endtask

  task automatic apb_read(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge clk);
    penable = 1;
    while (!pready) @(negedge clk);
    d = prdata;
    @(negedge clk);
    psel = 0; penable = 0;
  endtask

  task automatic wait_status(input int bitn);
    logic [31:0] d;
    do apb_read(IBE_R_STATUS, d); while (!d[bitn]);
  endtask

  task automatic dma(input logic [31:0] addr, input int bufsel, input int n, input logic store);
    apb_write(IBE_R_DMASRC, addr);
    apb_write(IBE_R_DMABUF, 32'(bufsel << 8));
    apb_write(IBE_R_DMALEN, 32'(n));
    apb_write(IBE_R_DMACTL, {30'd0, store, 1'b1});
    wait_status(3);
    apb_write(IBE_R_STATUS, 32'h8);
  endtask

  task automatic run(input ibe_mode_e m, input logic zs);
    apb_write(IBE_R_CTRL, {25'd0, 3'(m), 2'b00, zs, 1'b1});
    wait_status(1);
    apb_write(IBE_R_STATUS, 32'h2);
  endtask

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [31:0] d;
    real acc;
    int zeros, exp_cyc, nnz;
    for (int i = 0; i < D * D; i++) begin
      ma[i] = ($urandom_range(0, 99) < 56) ? 0.0 : real'(int'($urandom_range(0, 6)) - 3);
      mb[i] = real'(int'($urandom_range(0, 6)) - 3);
      mem[i] = r2f(ma[i]);
      mem[256 + i] = r2f(mb[i]);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    apb_write(IBE_R_IRQEN, 1);
    dma(32'h000, 0, D * D, 0);
    dma(32'h400, 1, D * D, 0);
    // mode 0 with zero skipping
    apb_write(IBE_R_DIM, 32'h000C_0C0C);
    run(IBE_MM, 1);
    chk(irqs > 0, "done interrupt");
    zeros = 0; exp_cyc = 0;
    for (int i = 0; i < D; i++) begin
      nnz = 0;
      for (int k = 0; k < D; k++) if (ma[i * D + k] == 0.0) zeros++; else nnz++;
      exp_cyc += 2 + ((nnz == 0) ? 1 : nnz);
    end
    apb_read(IBE_R_SKIPS, d);  chk(d == 32'(zeros), $sformatf("skips %0d exp %0d", d, zeros));
    apb_read(IBE_R_CYCLES, d); chk(d == 32'(exp_cyc), $sformatf("cycles %0d exp %0d", d, exp_cyc));
    dma(32'h800, 2, D * D, 1);
    for (int i = 0; i < D; i++)
      for (int j = 0; j < D; j++) begin
        acc = 0.0;
        for (int k = 0; k < D; k++) acc += ma[i * D + k] * mb[k * D + j];
        chk(f2r(mem[512 + i * D + j]) == acc, $sformatf("mode0 R[%0d][%0d]", i, j));
      end
    // mode 2, read through the window
    run(IBE_MMT, 1);
    for (int i = 0; i < D; i += 5)
      for (int j = 0; j < D; j += 2) begin
        acc = 0.0;
        for (int k = 0; k < D; k++) acc += ma[i * D + k] * mb[j * D + k];
        apb_read(12'hC00 + 12'((i * D + j) * 4), d);
        chk(f2r(d) == acc, $sformatf("mode2 R[%0d][%0d]", i, j));
      end
    // mode 1
    run(IBE_TR, 0);
    for (int i = 0; i < D; i += 3) begin
      apb_read(12'hC00 + 12'((i * D + 7) * 4), d);
      chk(f2r(d) == ma[7 * D + i], "mode1");
    end
    // mode 3
    apb_write(IBE_R_DIM, 32'h9000_0000);
    apb_write(IBE_R_SCALAR1, r2f(-2.5));
    run(IBE_VS, 0);
    for (int i = 0; i < D * D; i += 13) begin
      apb_read(12'hC00 + 12'(i * 4), d);
      chk(f2r(d) == ((ma[i] * -2.5 == 0.0) ? 0.0 : ma[i] * -2.5), "mode3");
    end
    // mode 4
    apb_write(IBE_R_RESULT, r2f(10.0));
    run(IBE_DOT, 0);
    acc = 10.0;
    for (int i = 0; i < D * D; i++) acc += ma[i] * mb[i];
    apb_read(IBE_R_RESULT, d); chk(f2r(d) == acc, $sformatf("mode4 %h exp %f", d, acc));
    // mode 6
    apb_write(IBE_R_RESULT, 0);
    run(IBE_KNN, 0);
    acc = 0.0;
    for (int i = 0; i < D * D; i++) acc += (ma[i] - mb[i]) ** 2;
    apb_read(IBE_R_RESULT, d); chk(f2r(d) == acc, $sformatf("mode6 %h exp %f", d, acc));
    // mode 5, degree 2
    apb_write(IBE_R_SCALAR1, r2f(0.125));
    apb_write(IBE_R_SCALAR2, r2f(1.0));
    apb_write(IBE_R_EXP, 2);
    run(IBE_SVM, 0);
    acc = 0.0;
    for (int i = 0; i < D * D; i++) acc += ma[i] * mb[i];
    acc = (0.125 * acc + 1.0) ** 2;
    apb_read(IBE_R_RESULT, d); chk(d == r2f(acc), $sformatf("mode5 %h exp %f", d, acc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
