// tb_ibe_zero_buf: writes a sparse random matrix (about half zeros, both
// +0.0 and -0.0) and checks every row of non-zero flags, then rewrites
// elements to make zeros non-zero and back.
module tb_ibe_zero_buf;
  import slh_pkg::*;
  localparam int D = IBE_DIM;
  logic clk = 0, rst_n = 0, we;
  logic [7:0] waddr;
  logic [3:0] row_sel;
  fp32_t wdata;
  logic [D-1:0] nz_row;
  logic nz_ref [D*D];
  int checks = 0, failures = 0, cyc = 0;
  int kind;

  ibe_zero_buf dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_rows();
    for (int r = 0; r < D; r++) begin
      row_sel = 4'(r);
      #1;
      for (int c = 0; c < D; c++) begin
        checks++;
        if (nz_row[c] !== nz_ref[r * D + c]) begin
          failures++;
          if (failures < 10) $display("FAIL flag (%0d,%0d) = %b", r, c, nz_row[c]);
        end
      end
    end
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0; row_sel = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < D * D; i++) nz_ref[i] = 0;
    check_rows();
    for (int pass = 0; pass < 3; pass++) begin
      for (int i = 0; i < D * D; i++) begin
        we = 1; waddr = 8'(i);
        kind = $urandom_range(0, 3);
        case (kind)
          0: wdata = 32'h0000_0000;
          1: wdata = 32'h8000_0000;
          default: wdata = {1'($urandom), 8'($urandom_range(1, 254)), 23'($urandom)};
        endcase
        nz_ref[i] = (wdata[30:0] != 0);
        @(negedge clk);
      end
      we = 0;
      check_rows();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
