// tb_slh200_top: end-to-end test of the sensor hub at its default sizes.
// The testbench plays the CPU (APB and SRAM ports), the external host (SPI)
// and a sensor (I2C model). It
//  - places sparse 12x12 operands in SRAM#1, loads them into the IBE with
//    the DMA while the CPU reads the same bank (arbitration stalls the DMA)
//    and touches a buffer window (wait states),
//  - runs all seven IBE modes with zero skipping on, checks results, stores
//    the product to SRAM#0 with the DMA and reads it back,
//  - has the SIC monitor the sensor, raise data-ready, and hands the data to
//    the CPU through the SIC SRAM's MCU port,
//  - walks through all five run modes by SIC command: low-power left by an
//    exception, sleep by an external event, down-active and power-down left
//    by the SIC with a CPU reboot; checks the IBE is isolated and reset
//    while powered off, and that software clock gating freezes it.
// Each of these mechanisms is counted and must occur at least once.
module tb_slh200_top;
  import slh_pkg::*;
  import tb_fp_pkg::*;
  localparam int D = IBE_DIM;
  localparam int HALF = 8;
  logic clk = 0, rst_n = 0;
  logic ibe_psel = 0, ibe_penable = 0, ibe_pwrite = 0, ibe_pready, ibe_irq;
  logic [11:0] ibe_paddr = 0;
  logic [31:0] ibe_pwdata = 0, ibe_prdata;
  logic sys_req = 0, sys_we = 0, sys_gnt, sys_rvalid;
  logic [3:0] sys_be = 4'hf;
  logic [16:0] sys_addr = 0;
  logic [31:0] sys_wdata = 0, sys_rdata;
  logic spi_sclk = 0, spi_ss_n = 1, spi_mosi = 0, spi_miso;
  logic i2c_scl_oe, i2c_sda_oe, sda_oe_s, scl, sda;
  logic mcu_en = 0, mcu_we = 0;
  logic [9:0] mcu_addr = 0;
  logic [7:0] mcu_wdata = 0, mcu_rdata;
  logic sic_intr_sdready, sic_intr_cpu_wic, sic_intr_powerctrl, sic_intr_runmode;
  logic cpu_exception = 0, ext_event = 0;
  logic [2:0] user_clk_en = 3'b111;
  runmode_e runmode;
  logic clk_en_cpu, pwr_eflash, pwr_ibe, pwr_cpu, pwr_sram0, pwr_sram1, cpu_rst_n, sic_sram_ret;
  logic [4:0] iso_en;
  int reads, hits, checks = 0, failures = 0, cyc = 0, waits = 0;
  real ma [D*D], mb [D*D];

  // mechanism counters
  int n_dma_stall = 0, n_apb_wait = 0, n_zero_skip = 0, n_dma_load = 0, n_dma_store = 0;
  int n_mode [7], n_runmode [5], n_wake_exc = 0, n_wake_evt = 0, n_reboot = 0, n_sdready = 0;
  int n_ibe_isolated = 0, n_clk_gated = 0, n_irq = 0;

  assign scl = !i2c_scl_oe;
  assign sda = !(i2c_sda_oe || sda_oe_s);

  slh200_top dut (.*, .i2c_sda_i(sda));
  i2c_sensor_model #(.DEV_ADDR(7'h69)) u_sensor (.clk, .scl, .sda, .sda_oe(sda_oe_s), .reads, .addr_hits(hits));

  always #5 clk = ~clk;
  runmode_e prev_mode = RM_NORMAL;
  logic prev_rst = 0, prev_sd = 0, prev_irq = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.dma_req && !dut.dma_gnt && sys_gnt) n_dma_stall++;
    if (runmode != prev_mode) n_runmode[int'(runmode)]++;
    prev_mode <= runmode;
    if (cpu_rst_n && !prev_rst && cyc > 10) n_reboot++;
    prev_rst <= cpu_rst_n;
    if (sic_intr_sdready && !prev_sd) n_sdready++;
    prev_sd <= sic_intr_sdready;
    if (ibe_irq && !prev_irq) n_irq++;
    prev_irq <= ibe_irq;
  end

  initial begin
    wait (cyc == 2000000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- CPU side ----------------
  task automatic apb_write(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk);
    ibe_psel = 1; ibe_penable = 0; ibe_pwrite = 1; ibe_paddr = a; ibe_pwdata = d;
    @(negedge clk);
    ibe_penable = 1;
    waits = 0;
    while (!ibe_pready) begin waits++; @(negedge clk); end
    if (waits > 0) n_apb_wait++;
    @(negedge clk);
    ibe_psel = 0; ibe_penable = 0;
  endtask

  task automatic apb_read(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    ibe_psel = 1; ibe_penable = 0; ibe_pwrite = 0; ibe_paddr = a;
    @(negedge clk);
    ibe_penable = 1;
    waits = 0;
    while (!ibe_pready) begin waits++; @(negedge clk); end
    if (waits > 0) n_apb_wait++;
    d = ibe_prdata;
    @(negedge clk);
    ibe_psel = 0; ibe_penable = 0;
  endtask

  task automatic sys_write(input logic [16:0] a, input logic [31:0] d);
    @(negedge clk);
    sys_req = 1; sys_we = 1; sys_addr = a; sys_wdata = d;
    while (!sys_gnt) @(negedge clk);
    @(negedge clk);
    sys_req = 0; sys_we = 0;
  endtask

  task automatic sys_read(input logic [16:0] a, output logic [31:0] d);
    @(negedge clk);
    sys_req = 1; sys_we = 0; sys_addr = a;
    while (!sys_gnt) @(negedge clk);
    @(negedge clk);
    sys_req = 0;
    d = sys_rdata;
  endtask

  task automatic wait_status(input int bitn);
    logic [31:0] d;
    do apb_read(IBE_R_STATUS, d); while (!d[bitn]);
  endtask

  task automatic run(input ibe_mode_e m);
    apb_write(IBE_R_CTRL, {25'd0, 3'(m), 2'b00, 1'b1, 1'b1});
    wait_status(1);
    apb_write(IBE_R_STATUS, 32'h2);
    n_mode[int'(m)]++;
  endtask

  task automatic dma(input logic [31:0] addr, input int bufsel, input logic store, input logic contend);
    logic [31:0] d;
    apb_write(IBE_R_DMASRC, addr);
    apb_write(IBE_R_DMABUF, 32'(bufsel << 8));
    apb_write(IBE_R_DMALEN, 32'(D * D));
    apb_write(IBE_R_DMACTL, {30'd0, store, 1'b1});
    if (contend) begin
      for (int i = 0; i < 20; i++) sys_read(17'h1_0000 + 17'(4 * i), d);
      apb_read(12'h400, d);          // buffer window while the DMA owns the buffers
    end
    wait_status(3);
    apb_write(IBE_R_STATUS, 32'h8);
    if (store) n_dma_store++; else n_dma_load++;
  endtask

  // ---------------- host side (SPI) ----------------
  task automatic xfer(input logic [7:0] o, output logic [7:0] i);
    for (int b = 7; b >= 0; b--) begin
      spi_mosi = o[b];
      repeat (HALF) @(negedge clk);
      spi_sclk = 1;
      i[b] = spi_miso;
      repeat (HALF) @(negedge clk);
      spi_sclk = 0;
    end
  endtask

  task automatic frame(input logic [7:0] b [], output logic [7:0] r []);
    r = new[b.size()];
    spi_ss_n = 0;
    repeat (HALF) @(negedge clk);
    for (int n = 0; n < b.size(); n++) xfer(b[n], r[n]);
    repeat (HALF) @(negedge clk);
    spi_ss_n = 1;
    repeat (2 * HALF) @(negedge clk);
  endtask

  task automatic set_mode(input runmode_e m);
    logic [7:0] r [];
    frame('{SIC_CMD_RUNMODE, 8'(m)}, r);
    repeat (40) @(negedge clk);
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
    logic [7:0] r [];
    real acc;
    int zeros;
    for (int i = 0; i < D * D; i++) begin
      ma[i] = ($urandom_range(0, 99) < 56) ? 0.0 : real'(int'($urandom_range(1, 3)) * (($urandom & 1) ? 1 : -1));
      mb[i] = real'(int'($urandom_range(0, 6)) - 3);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    // operands into SRAM#1
    for (int i = 0; i < D * D; i++) begin
      sys_write(17'h1_0000 + 17'(4 * i), r2f(ma[i]));
      sys_write(17'h1_0400 + 17'(4 * i), r2f(mb[i]));
    end
    apb_write(IBE_R_IRQEN, 1);
    dma(32'h1_0000, 0, 0, 1);
    dma(32'h1_0400, 1, 0, 0);
    // mode 0 with zero skipping, result stored to SRAM#0
    apb_write(IBE_R_DIM, 32'h9000_0000 | 32'h000C_0C0C);
    run(IBE_MM);
    zeros = 0;
    for (int i = 0; i < D * D; i++) if (ma[i] == 0.0) zeros++;
    apb_read(IBE_R_SKIPS, d);
    chk(d == 32'(zeros), $sformatf("zero skips %0d expected %0d", d, zeros));
    if (d > 0) n_zero_skip++;
    dma(32'h0_0100, 2, 1, 0);
    for (int i = 0; i < D; i++)
      for (int j = 0; j < D; j++) begin
        acc = 0.0;
        for (int k = 0; k < D; k++) acc += ma[i * D + k] * mb[k * D + j];
        sys_read(17'h0_0100 + 17'(4 * (i * D + j)), d);
        chk(f2r(d) == acc, $sformatf("A*B [%0d][%0d] %h expected %f", i, j, d, acc));
      end
    run(IBE_MMT);
    acc = 0.0;
    for (int k = 0; k < D; k++) acc += ma[3 * D + k] * mb[5 * D + k];
    apb_read(12'hC00 + 12'(4 * (3 * D + 5)), d);
    chk(f2r(d) == acc, "A*B^T element");
    run(IBE_TR);
    apb_read(12'hC00 + 12'(4 * (2 * D + 9)), d);
    chk(f2r(d) == ma[9 * D + 2], "transpose element");
    apb_write(IBE_R_SCALAR1, r2f(3.0));
    run(IBE_VS);
    apb_read(12'hC00 + 12'(4 * 77), d);
    chk(f2r(d) == 3.0 * ma[77] || (d[30:0] == 0 && ma[77] == 0.0), "vector*scalar element");
    apb_write(IBE_R_RESULT, 0);
    run(IBE_DOT);
    acc = 0.0;
    for (int i = 0; i < D * D; i++) acc += ma[i] * mb[i];
    apb_read(IBE_R_RESULT, d);
    chk(f2r(d) == acc, "dot product");
    apb_write(IBE_R_SCALAR1, r2f(0.25));
    apb_write(IBE_R_SCALAR2, r2f(2.0));
    apb_write(IBE_R_EXP, 3);
    run(IBE_SVM);
    apb_read(IBE_R_RESULT, d);
    chk(d == r2f((0.25 * acc + 2.0) ** 3), "SVM polynomial kernel");
    apb_write(IBE_R_RESULT, 0);
    run(IBE_KNN);
    acc = 0.0;
    for (int i = 0; i < D * D; i++) acc += (ma[i] - mb[i]) ** 2;
    apb_read(IBE_R_RESULT, d);
    chk(f2r(d) == acc, "KNN distance");
    chk(n_irq > 0, "IBE done interrupt");

    // software clock gating freezes the IBE
    user_clk_en = 3'b110;
    apb_write(IBE_R_SCALAR2, 32'h1234_5678);
    user_clk_en = 3'b111;
    apb_read(IBE_R_SCALAR2, d);
    chk(d == r2f(2.0), "write ignored while the IBE clock is gated");
    if (d == r2f(2.0)) n_clk_gated++;

    // SIC monitoring
    frame('{SIC_CMD_WRCFG, SIC_CFG_DEV, 8'h69}, r);
    frame('{SIC_CMD_WRCFG, SIC_CFG_REG, 8'h40}, r);
    frame('{SIC_CMD_WRCFG, SIC_CFG_NBYTES, 8'd6}, r);
    frame('{SIC_CMD_WRCFG, SIC_CFG_PERIOD, 8'd20}, r);
    frame('{SIC_CMD_WRCFG, SIC_CFG_THRESH, 8'd1}, r);
    frame('{SIC_CMD_WRCFG, SIC_CFG_INTEN, 8'h0f}, r);
    frame('{SIC_CMD_MONITOR, 8'h03}, r);
    while (!sic_intr_sdready) @(negedge clk);
    for (int i = 0; i < 6; i++) begin
      @(negedge clk); mcu_en = 1; mcu_addr = 10'(i);
      @(negedge clk); mcu_en = 0;
      chk(mcu_rdata == 8'h50 + 8'(i), "sensor data through the MCU port");
    end
    frame('{SIC_CMD_STATUS, 0}, r);

    // low-power: IBE off and isolated, CPU clock stopped; exception wakes
    set_mode(RM_LOWPOWER);
    chk(!clk_en_cpu && !pwr_ibe && pwr_cpu, "low-power gating");
    apb_read(IBE_R_SCALAR1, d);
    chk(d == 0, "powered-off IBE reads as zero");
    if (d == 0 && !pwr_ibe) n_ibe_isolated++;
    @(negedge clk); cpu_exception = 1; @(negedge clk); cpu_exception = 0;
    repeat (40) @(negedge clk);
    chk(runmode == RM_NORMAL && clk_en_cpu, "exception wakes the CPU");
    if (runmode == RM_NORMAL) n_wake_exc++;
    apb_read(IBE_R_SCALAR1, d);
    chk(d == 0, "IBE registers reset after power-up");
    // sleep: external event wakes
    set_mode(RM_SLEEP);
    chk(!clk_en_cpu && !pwr_sram1 && pwr_sram0, "sleep gating");
    @(negedge clk); ext_event = 1; @(negedge clk); ext_event = 0;
    repeat (40) @(negedge clk);
    if (runmode == RM_NORMAL) n_wake_evt++;
    chk(runmode == RM_NORMAL, "event wakes the CPU");
    // down-active: SIC keeps monitoring with the CPU off
    set_mode(RM_DOWNACTIVE);
    chk(!pwr_cpu && !cpu_rst_n && !pwr_sram0, "down-active power-off");
    begin
      int n_before;
      n_before = reads;
      repeat (20000) @(negedge clk);
      chk(reads > n_before, "SIC monitors while the CPU is off");
    end
    // power-down: SIC stand-by, SRAM retention; SIC brings the CPU back
    set_mode(RM_POWERDOWN);
    chk(sic_sram_ret && !pwr_cpu, "power-down retention");
    set_mode(RM_NORMAL);
    chk(pwr_cpu && cpu_rst_n && clk_en_cpu, "CPU rebooted");
    chk(sic_intr_powerctrl, "power-control interrupt");

    // every mechanism must have happened
    chk(n_dma_stall > 0, "DMA stalled by CPU access");
    chk(n_apb_wait > 0, "APB wait states");
    chk(n_zero_skip > 0, "zero skipping");
    chk(n_dma_load > 0 && n_dma_store > 0, "DMA load and store");
    for (int m = 0; m < 7; m++) chk(n_mode[m] > 0, $sformatf("IBE mode %0d", m));
    for (int m = 0; m < 5; m++) chk(n_runmode[m] > 0, $sformatf("run mode %0d entered", m));
    chk(n_wake_exc > 0 && n_wake_evt > 0, "wake-ups");
    chk(n_reboot > 0, "reboot");
    chk(n_sdready > 0, "sensor data ready");
    chk(n_ibe_isolated > 0 && n_clk_gated > 0, "IBE power and clock gating");
    $display("mechanisms: dma_stall=%0d apb_wait=%0d zero_skip=%0d dma_load=%0d dma_store=%0d reboot=%0d sdready=%0d",
             n_dma_stall, n_apb_wait, n_zero_skip, n_dma_load, n_dma_store, n_reboot, n_sdready);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
