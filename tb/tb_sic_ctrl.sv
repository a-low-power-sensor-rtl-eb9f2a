// tb_sic_ctrl: the SIC controller with its I2C master, its SRAM and a sensor
// model, fed SPI bytes at the byte level. Checks configuration write and
// read-back, periodic monitoring (the bytes stored in the SRAM must be the
// sensor's output sequence), the sample period, the data-ready interrupt
// after THRESH samples, the READ and STATUS commands (status cleared after
// reading), run-mode requests with their interrupts, and that monitoring
// stops in the stand-by modes (sleep, power-down).
module tb_sic_ctrl;
  import slh_pkg::*;
  localparam int DIV = 4;
  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, rx_first = 0;
  logic [7:0] rx_data = 0, tx_data;
  logic i2c_valid, i2c_ready, i2c_nack_out, i2c_done, i2c_nack;
  logic [1:0] i2c_cmd;
  logic [7:0] i2c_wdata, i2c_rdata;
  logic ram_en, ram_we;
  logic [9:0] ram_addr;
  logic [7:0] ram_wdata, ram_rdata, mb_rdata;
  logic sic_runmode_valid, sic_intr_sdready, sic_intr_cpu_wic, sic_intr_powerctrl, sic_intr_runmode;
  logic monitoring;
  runmode_e sic_current_runmode;
  logic scl_oe, sda_oe, sda_oe_s, scl, sda;
  int reads, hits, checks = 0, failures = 0, cyc = 0, rm_pulses = 0;

  assign scl = !scl_oe;
  assign sda = !(sda_oe || sda_oe_s);

  sic_ctrl dut (.*);
  sic_i2c_master #(.CLK_DIV(DIV)) u_i2c (.clk, .rst_n, .cmd_valid(i2c_valid), .cmd_ready(i2c_ready),
    .cmd(i2c_cmd), .wdata(i2c_wdata), .send_nack(i2c_nack_out), .done(i2c_done), .rdata(i2c_rdata),
    .nack(i2c_nack), .scl_oe, .sda_oe, .sda_i(sda));
  sic_sram u_ram (.clk, .a_en(ram_en), .a_we(ram_we), .a_addr(ram_addr), .a_wdata(ram_wdata),
    .a_rdata(ram_rdata), .b_en(1'b0), .b_we(1'b0), .b_addr(10'd0), .b_wdata(8'd0), .b_rdata(mb_rdata));
  i2c_sensor_model #(.DEV_ADDR(7'h68)) u_sensor (.clk, .scl, .sda, .sda_oe(sda_oe_s), .reads, .addr_hits(hits));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (sic_runmode_valid) rm_pulses++;
  end

  initial begin
    wait (cyc == 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one SPI byte at the byte level; returns the reply prepared for the next byte
  task automatic sbyte(input logic [7:0] d, input logic first, output logic [7:0] reply);
    @(negedge clk);
    rx_valid = 1; rx_data = d; rx_first = first;
    @(negedge clk);
    rx_valid = 0; rx_first = 0;
    repeat (4) @(negedge clk);
    reply = tx_data;
  endtask

  task automatic frame(input logic [7:0] b [], output logic [7:0] r []);
    r = new[b.size()];
    for (int i = 0; i < b.size(); i++) sbyte(b[i], i == 0, r[i]);
    repeat (4) @(negedge clk);
  endtask

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wrcfg(input logic [7:0] a, input logic [7:0] d);
    logic [7:0] r [];
    frame('{SIC_CMD_WRCFG, a, d}, r);
  endtask

  initial begin
    logic [7:0] r [];
    int t0, t1, nsamp;
    logic [7:0] expv;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wrcfg(SIC_CFG_DEV, 8'h68);
    wrcfg(SIC_CFG_REG, 8'h80);
    wrcfg(SIC_CFG_NBYTES, 8'd3);
    wrcfg(SIC_CFG_PERIOD, 8'd8);
    wrcfg(SIC_CFG_THRESH, 8'd4);
    wrcfg(SIC_CFG_INTEN, 8'h0f);
    frame('{SIC_CMD_RDCFG, SIC_CFG_NBYTES, 8'h00}, r);
    chk(r[1] == 8'd3, "configuration read-back");
    // monitoring in normal mode
    frame('{SIC_CMD_MONITOR, 8'h03}, r);
    chk(monitoring, "monitoring on");
    wait (u_sensor.reads == 3);
    t0 = cyc;
    wait (u_sensor.reads == 6);
    t1 = cyc;
    chk(t1 - t0 == 8 * 256, $sformatf("sample period %0d cycles", t1 - t0));
    chk(!sic_intr_sdready, "no data-ready before threshold");
    wait (u_sensor.reads == 12);
    repeat (300) @(negedge clk);
    chk(sic_intr_sdready, "data-ready after 4 samples");
    // stored bytes: read k (1-based, global) of byte j returns 3k + 0x80 + j
    frame('{SIC_CMD_READ, 8'h00, 8'h00, 8'h0, 8'h0, 8'h0, 8'h0, 8'h0, 8'h0, 8'h0, 8'h0, 8'h0, 8'h0, 8'h0, 8'h0}, r);
    for (int i = 0; i < 12; i++) begin
      expv = 8'(3 * (i + 1) + 8'h80 + (i % 3));
      chk(r[i + 2] == expv, $sformatf("sensor byte %0d: %h expected %h", i, r[i + 2], expv));
    end
    frame('{SIC_CMD_STATUS, 8'h0, 8'h0, 8'h0, 8'h0}, r);
    chk(r[0][SIC_IRQ_SDREADY] == 1'b1, "status shows data ready");
    chk(r[1] == 8'(RM_NORMAL), "status shows run mode");
    chk({r[2], r[3]} >= 16'd12, "status shows write pointer");
    chk(!sic_intr_sdready, "status read clears interrupt");
    // run mode requests
    frame('{SIC_CMD_RUNMODE, 8'(RM_LOWPOWER)}, r);
    chk(sic_current_runmode == RM_LOWPOWER && rm_pulses == 1, "low-power requested");
    chk(sic_intr_runmode && !sic_intr_powerctrl, "run-mode interrupt only");
    chk(monitoring, "monitoring continues in low-power");
    frame('{SIC_CMD_RUNMODE, 8'(RM_NORMAL)}, r);
    chk(sic_intr_cpu_wic, "CPU wake-up interrupt");
    frame('{SIC_CMD_RUNMODE, 8'(RM_POWERDOWN)}, r);
    chk(sic_intr_powerctrl, "power-control interrupt");
    chk(!monitoring, "stand-by in power-down");
    repeat (600) @(negedge clk);
    nsamp = u_sensor.reads;
    repeat (4000) @(negedge clk);
    chk(u_sensor.reads == nsamp, "no sensor reads in power-down");
    frame('{SIC_CMD_RUNMODE, 8'(RM_DOWNACTIVE)}, r);
    repeat (4000) @(negedge clk);
    chk(u_sensor.reads > nsamp, "sensor reads in down-active");
    frame('{SIC_CMD_MONITOR, 8'h00}, r);
    chk(!monitoring, "monitoring off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
