// tb_sic_sram: random reads and writes on both ports of the 1 KB sensor
// SRAM against an array model, including data written on one port and read
// on the other and the one-cycle read latency.
module tb_sic_sram;
  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [9:0] a_addr = 0, b_addr = 0;
  logic [7:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [7:0] model [1024];
  int checks = 0, failures = 0, cyc = 0;

  sic_sram dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ea, eb;
    logic ra, rb;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = 10'(i); a_wdata = $urandom; model[i] = a_wdata;
    end
    @(negedge clk);
    a_en = 0; a_we = 0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      a_en = 1'($urandom); a_we = 1'($urandom) && a_en; a_addr = $urandom; a_wdata = $urandom;
      b_en = 1'($urandom); b_we = 1'($urandom) && b_en; b_addr = $urandom; b_wdata = $urandom;
      if (a_we && b_we && a_addr == b_addr) b_we = 0;
      ra = a_en && !a_we; rb = b_en && !b_we;
      ea = model[a_addr]; eb = model[b_addr];
      if (a_we) model[a_addr] = a_wdata;
      if (b_we) model[b_addr] = b_wdata;
      @(negedge clk);
      a_en = 0; b_en = 0; a_we = 0; b_we = 0;
      if (ra) begin checks++; if (a_rdata !== ea) begin failures++; $display("FAIL port A"); end end
      if (rb) begin checks++; if (b_rdata !== eb) begin failures++; $display("FAIL port B"); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
