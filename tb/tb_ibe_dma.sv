// tb_ibe_dma: the DMA against a memory model that grants after random delays
// and returns read data one to three cycles after the grant, and a model of
// the three IBE buffers. Loads (memory to buffer) and stores (buffer to
// memory) of random lengths and offsets are checked word by word, and the
// transfer time of a load with immediate grants is checked (2 cycles per word).
module tb_ibe_dma;
  import slh_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0, dir, busy, done;
  logic [31:0] src;
  logic [1:0] sel, buf_sel;
  logic [7:0] buf_off, buf_addr;
  logic [8:0] len;
  logic buf_we;
  fp32_t buf_wdata, buf_rdata;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic [31:0] mem [1024];
  fp32_t bufm [3][256];
  int checks = 0, failures = 0, cyc = 0;
  int gnt_wait, rd_lat, fast;

  ibe_dma dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign buf_rdata = bufm[buf_sel][buf_addr];
  always @(posedge clk) if (buf_we) bufm[buf_sel][buf_addr] <= buf_wdata;

  // memory model
  logic [31:0] pend_addr;
  int pend_cnt = -1;
  always @(negedge clk) begin
    mem_gnt = 0;
    mem_rvalid = 0;
    if (pend_cnt == 0) begin
      mem_rvalid = 1;
      mem_rdata = mem[pend_addr[11:2]];
      pend_cnt = -1;
    end else if (pend_cnt > 0) pend_cnt--;
    if (mem_req && pend_cnt < 0 && !mem_rvalid) begin
      if (gnt_wait == 0) begin
        mem_gnt = 1;
        gnt_wait = fast ? 0 : $urandom_range(0, 2);
        if (mem_we) mem[mem_addr[11:2]] <= mem_wdata;
        else begin
          pend_addr = mem_addr;
          pend_cnt = fast ? 0 : $urandom_range(0, 2);
        end
      end else gnt_wait--;
    end
  end

  task automatic xfer(input logic d, input int base, input int s, input int off, input int n);
    dir = d; src = 32'(base * 4); sel = 2'(s); buf_off = 8'(off); len = 9'(n);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    int t0, base, off, n, s;
    gnt_wait = 0; fast = 0;
    dir = 0; src = 0; sel = 0; buf_off = 0; len = 0; mem_rdata = 0;
    for (int i = 0; i < 1024; i++) mem[i] = $urandom;
    for (int b = 0; b < 3; b++) for (int i = 0; i < 256; i++) bufm[b][i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      s = t % 3; n = $urandom_range(1, 144); off = $urandom_range(0, 144 - n); base = $urandom_range(0, 500);
      xfer(0, base, s, off, n);
      for (int i = 0; i < n; i++) begin
        checks++;
        if (bufm[s][off + i] !== mem[base + i]) begin
          failures++;
          if (failures < 10) $display("FAIL load buf%0d[%0d]", s, off + i);
        end
      end
      base = $urandom_range(512, 800);
      xfer(1, base, s, off, n);
      @(negedge clk);
      for (int i = 0; i < n; i++) begin
        checks++;
        if (mem[base + i] !== bufm[s][off + i]) begin
          failures++;
          if (failures < 10) $display("FAIL store mem[%0d]", base + i);
        end
      end
    end
    // timing with an always-ready memory: request + data cycle per word
    fast = 1; gnt_wait = 0;
    t0 = cyc;
    xfer(0, 0, 0, 0, 144);
    checks++;
    if (cyc - t0 != 2 * 144 + 2) begin
      failures++;
      $display("FAIL load of 144 words took %0d cycles", cyc - t0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
