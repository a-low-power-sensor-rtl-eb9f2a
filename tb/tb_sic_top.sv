// tb_sic_top: the SIC through its pins, as the host and the sensors see it.
// An SPI mode-0 master (SCLK = clk/16) configures monitoring of a sensor
// model on the I2C bus, waits for the data-ready interrupt, reads the stored
// samples both over SPI and through the MCU port of the sensor SRAM, reads
// and clears the status, and requests a run mode.
module tb_sic_top;
  import slh_pkg::*;
  localparam int HALF = 8;
  logic clk = 0, rst_n = 0;
  logic spi_sclk = 0, spi_ss_n = 1, spi_mosi = 0, spi_miso;
  logic i2c_scl_oe, i2c_sda_oe, sda_oe_s, scl, sda;
  logic mcu_en = 0, mcu_we = 0;
  logic [9:0] mcu_addr = 0;
  logic [7:0] mcu_wdata = 0, mcu_rdata;
  logic sic_runmode_valid, sic_intr_sdready, sic_intr_cpu_wic, sic_intr_powerctrl, sic_intr_runmode, monitoring;
  runmode_e sic_current_runmode;
  int reads, hits, checks = 0, failures = 0, cyc = 0;

  assign scl = !i2c_scl_oe;
  assign sda = !(i2c_sda_oe || sda_oe_s);

  sic_top #(.I2C_DIV(4)) dut (.clk, .rst_n, .spi_sclk, .spi_ss_n, .spi_mosi, .spi_miso,
    .i2c_scl_oe, .i2c_sda_oe, .i2c_sda_i(sda), .mcu_en, .mcu_we, .mcu_addr, .mcu_wdata, .mcu_rdata,
    .sic_runmode_valid, .sic_current_runmode, .sic_intr_sdready, .sic_intr_cpu_wic,
    .sic_intr_powerctrl, .sic_intr_runmode, .monitoring);
  i2c_sensor_model #(.DEV_ADDR(7'h0c)) u_sensor (.clk, .scl, .sda, .sda_oe(sda_oe_s), .reads, .addr_hits(hits));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 300000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [7:0] r [];
    logic [7:0] expv;
    repeat (3) @(posedge clk);
    rst_n = 1;
    frame('{SIC_CMD_WRCFG, SIC_CFG_DEV, 8'h0c}, r);
    frame('{SIC_CMD_WRCFG, SIC_CFG_REG, 8'h03}, r);
    frame('{SIC_CMD_WRCFG, SIC_CFG_NBYTES, 8'd6}, r);
    frame('{SIC_CMD_WRCFG, SIC_CFG_PERIOD, 8'd6}, r);
    frame('{SIC_CMD_WRCFG, SIC_CFG_THRESH, 8'd2}, r);
    frame('{SIC_CMD_WRCFG, SIC_CFG_INTEN, 8'h0f}, r);
    frame('{SIC_CMD_RDCFG, SIC_CFG_PERIOD, 8'h00}, r);
    chk(r[2] == 8'd6, "configuration read back over SPI");
    frame('{SIC_CMD_MONITOR, 8'h03}, r);
    while (!sic_intr_sdready) @(negedge clk);
    chk(reads >= 12, "two samples of six bytes read from the sensor");
    // registers 3..8 of the model hold 0x13..0x18
    frame('{SIC_CMD_READ, 8'h00, 8'h00, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0}, r);
    for (int i = 0; i < 12; i++) begin
      expv = 8'h13 + 8'(i % 6);
      chk(r[i + 3] == expv, $sformatf("SPI read byte %0d: %h expected %h", i, r[i + 3], expv));
    end
    for (int i = 0; i < 6; i++) begin
      @(negedge clk); mcu_en = 1; mcu_addr = 10'(i);
      @(negedge clk); mcu_en = 0;
      chk(mcu_rdata == 8'h13 + 8'(i), "MCU port read");
    end
    frame('{SIC_CMD_STATUS, 0, 0}, r);
    chk(r[1][SIC_IRQ_SDREADY], "status over SPI");
    chk(!sic_intr_sdready, "interrupt cleared");
    frame('{SIC_CMD_RUNMODE, 8'(RM_SLEEP)}, r);
    chk(sic_current_runmode == RM_SLEEP && sic_intr_runmode && !monitoring, "sleep requested, SIC in stand-by");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
