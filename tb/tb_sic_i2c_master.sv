// tb_sic_i2c_master: the I2C master reads and writes registers of the sensor
// model over an open-drain bus: a register write, a burst read with repeated
// START and NACK on the last byte, an access to an absent address (NACK
// reported), and the duration of one byte (9 bits x 4 quarters x CLK_DIV).
module tb_sic_i2c_master;
  localparam int DIV = 8;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, send_nack = 0, done, nack, scl_oe, sda_oe, sda_oe_s;
  logic [1:0] cmd = 0;
  logic [7:0] wdata = 0, rdata;
  logic scl, sda;
  int reads, hits, checks = 0, failures = 0, cyc = 0;

  assign scl = !scl_oe;
  assign sda = !(sda_oe || sda_oe_s);

  sic_i2c_master #(.CLK_DIV(DIV)) dut (.clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .wdata,
    .send_nack, .done, .rdata, .nack, .scl_oe, .sda_oe, .sda_i(sda));
  i2c_sensor_model #(.DEV_ADDR(7'h1d)) u_sensor (.clk, .scl, .sda, .sda_oe(sda_oe_s),
    .reads, .addr_hits(hits));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 50000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(input logic [1:0] c, input logic [7:0] d, input logic nk);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd = c; wdata = d; send_nack = nk;
    @(negedge clk);
    cmd_valid = 0;
    while (!done) @(negedge clk);
  endtask

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int t0;
    logic [7:0] got [4];
    repeat (3) @(posedge clk);
    rst_n = 1;
    // write 0xA5, 0x5A to registers 0x20, 0x21
    op(0, 0, 0);
    op(1, {7'h1d, 1'b0}, 0); chk(!nack, "address acknowledged");
    op(1, 8'h20, 0);         chk(!nack, "register acknowledged");
    op(1, 8'hA5, 0);
    op(1, 8'h5A, 0);
    op(3, 0, 0);
    chk(u_sensor.regs[8'h20] == 8'hA5 && u_sensor.regs[8'h21] == 8'h5A, "register write");
    // burst read of 4 registers from 0x1f
    op(0, 0, 0);
    op(1, {7'h1d, 1'b0}, 0);
    op(1, 8'h1f, 0);
    op(0, 0, 0);
    op(1, {7'h1d, 1'b1}, 0); chk(!nack, "read address acknowledged");
    for (int i = 0; i < 4; i++) begin
      op(2, 0, i == 3);
      got[i] = rdata;
    end
    op(3, 0, 0);
    chk(got[0] == 8'h2f && got[1] == 8'hA5 && got[2] == 8'h5A && got[3] == 8'h32,
        $sformatf("burst read %h %h %h %h", got[0], got[1], got[2], got[3]));
    chk(reads == 4, $sformatf("sensor sent %0d bytes", reads));
    // absent device
    op(0, 0, 0);
    op(1, {7'h33, 1'b0}, 0); chk(nack, "absent device gives NACK");
    op(3, 0, 0);
    chk(scl && sda, "bus released after STOP");
    // byte time
    op(0, 0, 0);
    t0 = cyc;
    op(1, {7'h1d, 1'b0}, 0);
    // nine bits, plus one cycle to accept the command and one to report it
    chk(cyc - t0 == 9 * 4 * DIV + 2, $sformatf("byte took %0d cycles", cyc - t0));
    op(3, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
