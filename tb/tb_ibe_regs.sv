// tb_ibe_regs: APB3 accesses to the IBE register block: read-back of every
// read/write register, the start and DMA-start pulses, the sticky done flag
// and its write-1-to-clear, the done interrupt, the buffer windows and the
// wait states inserted on buffer accesses while the engine is busy.
module tb_ibe_regs;
  import slh_pkg::*;
  logic clk = 0, rst_n = 0;
  logic psel = 0, penable = 0, pwrite = 0, pready, pslverr, irq;
  logic [11:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  logic start, zskip_en, busy = 0, done = 0, result_we = 0;
  ibe_mode_e mode;
  logic [3:0] dim_m, dim_k, dim_n;
  logic [7:0] vlen, exponent;
  fp32_t scalar1, scalar2, result, result_in = 0;
  logic [31:0] cycles = 32'd1234, skips = 32'd77;
  logic dma_start, dma_dir, dma_busy = 0, dma_done = 0;
  logic [31:0] dma_src;
  logic [1:0] dma_sel, hbuf_sel;
  logic [7:0] dma_off, hbuf_addr;
  logic [8:0] dma_len;
  logic hbuf_we;
  fp32_t hbuf_wdata, hbuf_rdata;
  fp32_t bufm [3][256];
  int checks = 0, failures = 0, cyc = 0, starts = 0, dstarts = 0, waits;

  ibe_regs dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (start) starts++;
    if (dma_start) dstarts++;
    if (hbuf_we) bufm[hbuf_sel][hbuf_addr] <= hbuf_wdata;
  end
  assign hbuf_rdata = bufm[hbuf_sel][hbuf_addr];

  initial begin
    wait (cyc == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apb_write(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk);
    psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk);
    penable = 1;
    waits = 0;
    while (!pready) begin waits++; @(negedge clk); end
    @(negedge clk);
    psel = 0; penable = 0;
  endtask

  task automatic apb_read(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge clk);
    penable = 1;
    waits = 0;
    while (!pready) begin waits++; @(negedge clk); end
    d = prdata;
    @(negedge clk);
    psel = 0; penable = 0;
  endtask

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [31:0] d;
    logic [11:0] rw [9] = '{IBE_R_DIM, IBE_R_SCALAR1, IBE_R_SCALAR2, IBE_R_RESULT, IBE_R_DMASRC,
                           IBE_R_EXP, IBE_R_IRQEN, IBE_R_DMABUF, IBE_R_DMALEN};
    logic [31:0] msk [9] = '{32'hffff_ffff, 32'hffff_ffff, 32'hffff_ffff, 32'hffff_ffff, 32'hffff_ffff,
                            32'h0000_00ff, 32'h0000_0001, 32'h0000_03ff, 32'h0000_01ff};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 9; i++) begin
      logic [31:0] v;
      v = $urandom;
      apb_write(rw[i], v);
      apb_read(rw[i], d);
      chk(d == (v & msk[i]), $sformatf("readback %h: %h vs %h", rw[i], d, v & msk[i]));
    end
    apb_write(IBE_R_DIM, 32'h5A03_0C07);
    chk(dim_m == 7 && dim_k == 12 && dim_n == 3 && vlen == 8'h5A, "dimension fields");
    apb_read(IBE_R_CYCLES, d); chk(d == 1234, "cycles register");
    apb_read(IBE_R_SKIPS, d);  chk(d == 77, "skips register");
    // start
    apb_write(IBE_R_CTRL, 32'h0000_0053);
    @(negedge clk);
    chk(starts == 1 && mode == IBE_SVM && zskip_en, "start pulse, mode and zero-skip fields");
    apb_write(IBE_R_IRQEN, 1);
    @(negedge clk); busy = 1;
    apb_write(IBE_R_CTRL, 32'h0000_0001);
    chk(starts == 1, "start ignored while busy");
    // buffer window waits while busy
    fork
      apb_write(12'h404, 32'hdead_beef);
      begin repeat (6) @(negedge clk); busy = 0; done = 1; result_we = 1; result_in = 32'h4040_0000;
            @(negedge clk); done = 0; result_we = 0; end
    join
    chk(waits >= 3, $sformatf("wait states on buffer access while busy (%0d)", waits));
    chk(bufm[0][1] == 32'hdead_beef, "A window write");
    apb_read(IBE_R_STATUS, d); chk(d[1:0] == 2'b10, "done flag set, busy clear");
    chk(irq, "irq on done");
    apb_read(IBE_R_RESULT, d); chk(d == 32'h4040_0000, "result captured from engine");
    apb_write(IBE_R_STATUS, 32'h2);
    apb_read(IBE_R_STATUS, d); chk(d[1] == 0 && !irq, "done write-1-to-clear");
    // windows
    for (int w = 1; w < 4; w++) begin
      apb_write(12'(w * 1024 + 4 * 143), 32'(w * 111));
      apb_read(12'(w * 1024 + 4 * 143), d);
      chk(d == 32'(w * 111), $sformatf("window %0d", w));
    end
    // DMA start
    apb_write(IBE_R_DMABUF, 32'h0000_0105);
    apb_write(IBE_R_DMACTL, 32'h3);
    @(negedge clk);
    chk(dstarts == 1 && dma_dir && dma_sel == 1 && dma_off == 5, "DMA start and fields");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
