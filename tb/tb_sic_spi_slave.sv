// tb_sic_spi_slave: an SPI mode-0 master (SCLK = clk/16) exchanges frames
// with the slave, whose reply to each byte is the received byte plus one
// (the first reply of a frame is 0x5A). Checks received bytes, the
// first-byte flag and every byte returned on MISO.
module tb_sic_spi_slave;
  localparam int HALF = 8;
  logic clk = 0, rst_n = 0;
  logic sclk = 0, ss_n = 1, mosi = 0, miso, rx_valid, rx_first, active;
  logic [7:0] rx_data, tx_data;
  logic [7:0] rx_log [$];
  logic first_log [$];
  int checks = 0, failures = 0, cyc = 0;

  sic_spi_slave dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (!rst_n) tx_data <= 8'h5A;
    else if (rx_valid) begin
      tx_data <= rx_data + 8'd1;
      rx_log.push_back(rx_data);
      first_log.push_back(rx_first);
    end else if (!active) tx_data <= 8'h5A;
  end

  initial begin
    wait (cyc == 50000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(input logic [7:0] o, output logic [7:0] i);
    for (int b = 7; b >= 0; b--) begin
      mosi = o[b];
      repeat (HALF) @(negedge clk);
      sclk = 1;
      i[b] = miso;
      repeat (HALF) @(negedge clk);
      sclk = 0;
    end
  endtask

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [7:0] o, i, prev;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int f = 0; f < 6; f++) begin
      ss_n = 0;
      repeat (HALF) @(negedge clk);
      for (int n = 0; n < 5; n++) begin
        o = $urandom;
        xfer(o, i);
        chk(i == ((n == 0) ? 8'h5A : prev + 8'd1), $sformatf("frame %0d byte %0d miso %h", f, n, i));
        prev = o;
        repeat (4) @(negedge clk);
        chk(rx_log.size() > 0 && rx_log.pop_front() == o, $sformatf("frame %0d byte %0d received", f, n));
        chk(first_log.size() > 0 && first_log.pop_front() == (n == 0), "first-byte flag");
      end
      ss_n = 1;
      repeat (3 * HALF) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
