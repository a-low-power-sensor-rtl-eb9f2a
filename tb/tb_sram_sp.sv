// tb_sram_sp: byte-enabled writes and reads of a system SRAM bank at its
// full 64 KB size, checked against an array model, including the one-cycle
// read latency and reads that follow partial writes.
module tb_sram_sp;
  localparam int W = 16384;
  logic clk = 0, ce = 0, we = 0;
  logic [3:0] be = 0;
  logic [13:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] model [W];
  int checks = 0, failures = 0, cyc = 0;

  sram_sp dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e;
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      ce = 1; we = 1; be = 4'hf; addr = 14'(i); wdata = $urandom; model[i] = wdata;
    end
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      ce = 1; we = 1'($urandom); be = $urandom; addr = $urandom; wdata = $urandom;
      e = model[addr];
      if (we) for (int b = 0; b < 4; b++) if (be[b]) model[addr][8*b +: 8] = wdata[8*b +: 8];
      @(negedge clk);
      ce = 0; we = 0;
      checks++;
      if (rdata !== e) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d: %h expected %h", addr, rdata, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
