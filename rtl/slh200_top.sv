// slh200_top: the SLH-200 sensor hub SoC around its own hardware: the
// Intelligence Boost Engine (IBE), the two 64 KB system SRAM banks, the
// Sensor Interface Controller (SIC) and the PMU. The Cortex-M4F CPU, its
// bus matrix, the embedded flash and the standard peripherals are licensed
// or foundry parts and sit outside; their connections are the ports here:
//  - ibe_*   APB3 port of the IBE (from the CPU's peripheral bus)
//  - sys_*   CPU port to the system SRAM: byte address bit 16 selects SRAM#0
//            or SRAM#1, sys_gnt accepts, data returns one cycle later with
//            sys_rvalid
//  - spi_*   SIC SPI slave pins to the external host
//  - i2c_*   SIC I2C pins to the sensors (open drain)
//  - mcu_*   CPU port of the SIC's sensor SRAM
//  - power-control outputs drive the power switches, isolation cells and
//    the CPU reset; the SIC interrupts go to the CPU.
// Each SRAM bank is shared by the CPU port (first priority) and the IBE DMA
// (second). The PMU gates the bank enables and the IBE clock; a powered-off
// IBE is held in reset and its APB port answers with zero. Everything runs
// on clk (the SIC's separate clock source is left out). The wiring follows
// the source design's block diagram as far as its text goes; the
// arbitration and the port split are this design's choices.
module slh200_top
  import slh_pkg::*;
#(
  parameter int unsigned SRAM_WORDS = 16384,   // per bank: 64 KB
  parameter int unsigned SIC_BYTES  = 1024,
  parameter int unsigned I2C_DIV    = 16,
  parameter int unsigned PWR_DLY    = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // IBE host port
  input  logic        ibe_psel,
  input  logic        ibe_penable,
  input  logic        ibe_pwrite,
  input  logic [11:0] ibe_paddr,
  input  logic [31:0] ibe_pwdata,
  output logic [31:0] ibe_prdata,
  output logic        ibe_pready,
  output logic        ibe_irq,
  // CPU port to the system SRAM
  input  logic        sys_req,
  input  logic        sys_we,
  input  logic [3:0]  sys_be,
  input  logic [16:0] sys_addr,
  input  logic [31:0] sys_wdata,
  output logic        sys_gnt,
  output logic        sys_rvalid,
  output logic [31:0] sys_rdata,
  // SIC
  input  logic        spi_sclk,
  input  logic        spi_ss_n,
  input  logic        spi_mosi,
  output logic        spi_miso,
  output logic        i2c_scl_oe,
  output logic        i2c_sda_oe,
  input  logic        i2c_sda_i,
  input  logic        mcu_en,
  input  logic        mcu_we,
  input  logic [$clog2(SIC_BYTES)-1:0] mcu_addr,
  input  logic [7:0]  mcu_wdata,
  output logic [7:0]  mcu_rdata,
  output logic        sic_intr_sdready,
  output logic        sic_intr_cpu_wic,
  output logic        sic_intr_powerctrl,
  output logic        sic_intr_runmode,
  // power management
  input  logic        cpu_exception,
  input  logic        ext_event,
  input  logic [2:0]  user_clk_en,
  output runmode_e    runmode,
  output logic        clk_en_cpu,
  output logic        pwr_eflash,
  output logic        pwr_ibe,
  output logic        pwr_cpu,
  output logic        pwr_sram0,
  output logic        pwr_sram1,
  output logic [4:0]  iso_en,
  output logic        cpu_rst_n,
  output logic        sic_sram_ret
);
  localparam int unsigned AW = $clog2(SRAM_WORDS);

  // ---------------- PMU and SIC ----------------
  logic     sic_runmode_valid, sic_monitoring, pmu_busy;
  runmode_e sic_runmode;
  logic     clk_en_sram0, clk_en_sram1, clk_en_ibe;

  sic_top #(.BYTES(SIC_BYTES), .I2C_DIV(I2C_DIV)) u_sic (
    .clk, .rst_n, .spi_sclk, .spi_ss_n, .spi_mosi, .spi_miso,
    .i2c_scl_oe, .i2c_sda_oe, .i2c_sda_i,
    .mcu_en, .mcu_we, .mcu_addr, .mcu_wdata, .mcu_rdata,
    .sic_runmode_valid, .sic_current_runmode(sic_runmode),
    .sic_intr_sdready, .sic_intr_cpu_wic, .sic_intr_powerctrl, .sic_intr_runmode,
    .monitoring(sic_monitoring)
  );

  pmu #(.PWR_DLY(PWR_DLY)) u_pmu (
    .clk, .rst_n, .runmode_valid(sic_runmode_valid), .runmode(sic_runmode),
    .cpu_exception, .ext_event, .user_clk_en, .mode(runmode),
    .clk_en_cpu, .clk_en_sram0, .clk_en_sram1, .clk_en_ibe,
    .pwr_eflash, .pwr_ibe, .pwr_cpu, .pwr_sram0, .pwr_sram1, .iso_en, .cpu_rst_n,
    .sic_sram_ret, .busy(pmu_busy)
  );

  // ---------------- IBE ----------------
  logic        ibe_clk, ibe_rst_n, ibe_on;
  logic        ibe_pready_i, ibe_irq_i, ibe_pslverr;
  logic [31:0] ibe_prdata_i;
  logic        dma_req, dma_we, dma_gnt, dma_rvalid;
  logic [31:0] dma_addr, dma_wdata, dma_rdata;

  assign ibe_on    = pwr_ibe && !iso_en[1];
  assign ibe_rst_n = rst_n && pwr_ibe;

  clk_gate u_ibe_cg (.clk, .en(clk_en_ibe), .gclk(ibe_clk));

  ibe_top u_ibe (
    .clk(ibe_clk), .rst_n(ibe_rst_n),
    .psel(ibe_psel && ibe_on), .penable(ibe_penable), .pwrite(ibe_pwrite), .paddr(ibe_paddr),
    .pwdata(ibe_pwdata), .prdata(ibe_prdata_i), .pready(ibe_pready_i), .pslverr(ibe_pslverr),
    .irq(ibe_irq_i),
    .mem_req(dma_req), .mem_we(dma_we), .mem_addr(dma_addr), .mem_wdata(dma_wdata),
    .mem_gnt(dma_gnt), .mem_rvalid(dma_rvalid), .mem_rdata(dma_rdata)
  );

  // isolation of the IBE outputs
  assign ibe_prdata = ibe_on ? ibe_prdata_i : '0;
  assign ibe_pready = ibe_on ? ibe_pready_i : 1'b1;
  assign ibe_irq    = ibe_on && ibe_irq_i;

  // ---------------- system SRAM banks ----------------
  logic [1:0]    bank_ce, bank_en, host_hit, dma_hit, dma_sel_q;
  logic          host_rd_q, dma_rd_q, host_bank_q;
  logic [31:0]   bank_rdata [2];
  logic [AW-1:0] bank_addr [2];
  logic [31:0]   bank_wdata [2];
  logic [3:0]    bank_be [2];
  logic [1:0]    bank_we;

  assign bank_en = {clk_en_sram1, clk_en_sram0};

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      host_hit[b] = sys_req && (sys_addr[16] == 1'(b)) && bank_en[b];
      dma_hit[b]  = dma_req && (dma_addr[16] == 1'(b)) && bank_en[b] && !host_hit[b];
      bank_ce[b]  = host_hit[b] || dma_hit[b];
      bank_we[b]  = host_hit[b] ? sys_we : dma_we;
      bank_be[b]  = host_hit[b] ? sys_be : 4'hf;
      bank_addr[b]  = host_hit[b] ? sys_addr[AW+1:2] : dma_addr[AW+1:2];
      bank_wdata[b] = host_hit[b] ? sys_wdata : dma_wdata;
    end
  end

  for (genvar b = 0; b < 2; b++) begin : g_bank
    sram_sp #(.WORDS(SRAM_WORDS)) u_sram (
      .clk, .ce(bank_ce[b]), .we(bank_we[b]), .be(bank_be[b]), .addr(bank_addr[b]),
      .wdata(bank_wdata[b]), .rdata(bank_rdata[b])
    );
  end

  assign sys_gnt = |host_hit;
  assign dma_gnt = |dma_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      host_rd_q <= 1'b0; host_bank_q <= 1'b0; dma_rd_q <= 1'b0; dma_sel_q <= '0;
    end else begin
      host_rd_q   <= sys_gnt && !sys_we;
      host_bank_q <= sys_addr[16];
      dma_rd_q    <= dma_gnt && !dma_we;
      dma_sel_q   <= dma_hit;
    end
  end

  assign sys_rvalid = host_rd_q;
  assign sys_rdata  = bank_rdata[host_bank_q];
  assign dma_rvalid = dma_rd_q;
  assign dma_rdata  = dma_sel_q[1] ? bank_rdata[1] : bank_rdata[0];
endmodule
