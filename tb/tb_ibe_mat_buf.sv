// tb_ibe_mat_buf: fills the 12x12 buffer through the word port, then checks
// word, row and column reads against a copy, and the row write port.
module tb_ibe_mat_buf;
  import slh_pkg::*;
  localparam int D = IBE_DIM;
  logic clk = 0, rst_n = 0, we, row_we;
  logic [7:0] waddr, raddr;
  logic [3:0] row_waddr, row_sel, col_sel;
  fp32_t wdata, rdata;
  fp32_t [D-1:0] row_wdata, row_data, col_data;
  fp32_t ref_m [D][D];
  int checks = 0, failures = 0, cyc = 0;

  ibe_mat_buf dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input fp32_t got, input fp32_t exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h expected %h", what, got, exp_v);
    end
  endtask

  task automatic check_all();
    for (int r = 0; r < D; r++) begin
      row_sel = 4'(r); col_sel = 4'(r);
      for (int c = 0; c < D; c++) begin
        raddr = 8'(r * D + c);
        #1;
        chk(rdata, ref_m[r][c], "word");
        chk(row_data[c], ref_m[r][c], "row");
        chk(col_data[c], ref_m[c][r], "column");
      end
    end
  endtask

  initial begin
    we = 0; row_we = 0; waddr = 0; raddr = 0; wdata = 0; row_waddr = 0; row_sel = 0; col_sel = 0;
    row_wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int r = 0; r < D; r++)
      for (int c = 0; c < D; c++) ref_m[r][c] = 32'h0;
    check_all();
    for (int r = 0; r < D; r++)
      for (int c = 0; c < D; c++) begin
        we = 1; waddr = 8'(r * D + c); wdata = $urandom; ref_m[r][c] = wdata;
        @(negedge clk);
      end
    we = 0;
    check_all();
    for (int r = 0; r < D; r += 3) begin
      row_we = 1; row_waddr = 4'(r);
      for (int c = 0; c < D; c++) begin row_wdata[c] = $urandom; ref_m[r][c] = row_wdata[c]; end
      @(negedge clk);
    end
    row_we = 0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
