// sic_top: the Sensor Interface Controller, a small always-on block that
// monitors the sensors in place of the CPU. It combines an SPI slave (the
// host CPU's command and data channel), an I2C master (the sensors), the
// hard-wired controller state machine and a 1 KB dual-port sensor-data SRAM
// whose second port belongs to the internal MCU. Its run-mode request and
// four interrupt lines go to the PMU and to the CPU. Command set and timing:
// see sic_ctrl, sic_spi_slave and sic_i2c_master. Everything runs on clk;
// SCLK must be at most clk/8.
module sic_top
  import slh_pkg::*;
#(
  parameter int unsigned BYTES   = 1024,
  parameter int unsigned I2C_DIV = 16,
  localparam int unsigned AW = $clog2(BYTES)
) (
  input  logic          clk,
  input  logic          rst_n,
  // SPI to the host
  input  logic          spi_sclk,
  input  logic          spi_ss_n,
  input  logic          spi_mosi,
  output logic          spi_miso,
  // I2C to the sensors (open drain)
  output logic          i2c_scl_oe,
  output logic          i2c_sda_oe,
  input  logic          i2c_sda_i,
  // internal MCU port of the sensor SRAM
  input  logic          mcu_en,
  input  logic          mcu_we,
  input  logic [AW-1:0] mcu_addr,
  input  logic [7:0]    mcu_wdata,
  output logic [7:0]    mcu_rdata,
  // run mode and interrupts
  output logic          sic_runmode_valid,
  output runmode_e      sic_current_runmode,
  output logic          sic_intr_sdready,
  output logic          sic_intr_cpu_wic,
  output logic          sic_intr_powerctrl,
  output logic          sic_intr_runmode,
  output logic          monitoring
);
  logic       rx_valid, rx_first, spi_active;
  logic [7:0] rx_data, tx_data;
  logic       i2c_valid, i2c_ready, i2c_nack_out, i2c_done, i2c_nack;
  logic [1:0] i2c_cmd;
  logic [7:0] i2c_wdata, i2c_rdata;
  logic          ram_en, ram_we;
  logic [AW-1:0] ram_addr;
  logic [7:0]    ram_wdata, ram_rdata;

  sic_spi_slave u_spi (
    .clk, .rst_n, .sclk(spi_sclk), .ss_n(spi_ss_n), .mosi(spi_mosi), .miso(spi_miso),
    .rx_valid, .rx_data, .rx_first, .active(spi_active), .tx_data
  );

  sic_i2c_master #(.CLK_DIV(I2C_DIV)) u_i2c (
    .clk, .rst_n, .cmd_valid(i2c_valid), .cmd_ready(i2c_ready), .cmd(i2c_cmd),
    .wdata(i2c_wdata), .send_nack(i2c_nack_out), .done(i2c_done), .rdata(i2c_rdata),
    .nack(i2c_nack), .scl_oe(i2c_scl_oe), .sda_oe(i2c_sda_oe), .sda_i(i2c_sda_i)
  );

  sic_ctrl #(.BYTES(BYTES)) u_ctrl (
    .clk, .rst_n, .rx_valid, .rx_data, .rx_first, .tx_data,
    .i2c_valid, .i2c_ready, .i2c_cmd, .i2c_wdata, .i2c_nack_out, .i2c_done, .i2c_rdata, .i2c_nack,
    .ram_en, .ram_we, .ram_addr, .ram_wdata, .ram_rdata,
    .sic_runmode_valid, .sic_current_runmode, .sic_intr_sdready, .sic_intr_cpu_wic,
    .sic_intr_powerctrl, .sic_intr_runmode, .monitoring
  );

  sic_sram #(.BYTES(BYTES)) u_sram (
    .clk, .a_en(ram_en), .a_we(ram_we), .a_addr(ram_addr), .a_wdata(ram_wdata), .a_rdata(ram_rdata),
    .b_en(mcu_en), .b_we(mcu_we), .b_addr(mcu_addr), .b_wdata(mcu_wdata), .b_rdata(mcu_rdata)
  );
endmodule
