// tb_pmu: steps the PMU through every run mode and checks, once the power
// sequence has settled, the clock enables, domain power enables, isolation,
// CPU reset and SIC SRAM retention against the run-mode table. It also
// checks the order of a power-down (isolation one cycle before power off),
// the PWR_DLY settling time of a power-up, wake-up from low-power and sleep
// by an exception or external event, and that only the SIC can leave
// the CPU-off modes.
module tb_pmu;
  import slh_pkg::*;
  localparam int DLY = 16;
  logic clk = 0, rst_n = 0;
  logic runmode_valid = 0, cpu_exception = 0, ext_event = 0;
  runmode_e runmode = RM_NORMAL, mode;
  logic [2:0] user_clk_en = 3'b111;
  logic clk_en_cpu, clk_en_sram0, clk_en_sram1, clk_en_ibe;
  logic pwr_eflash, pwr_ibe, pwr_cpu, pwr_sram0, pwr_sram1, cpu_rst_n, sic_sram_ret, busy;
  logic [4:0] iso_en;
  int checks = 0, failures = 0, cyc = 0;

  pmu #(.PWR_DLY(DLY)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic request(input runmode_e m);
    @(negedge clk);
    runmode_valid = 1; runmode = m;
    @(negedge clk);
    runmode_valid = 0;
    repeat (DLY + 6) @(negedge clk);
  endtask

  // expected {clk cpu, sram0, sram1, ibe} and {pwr eflash, ibe, cpu, sram0, sram1}
  task automatic expect_mode(input runmode_e m, input logic [3:0] clks, input logic [4:0] pwr);
    chk(mode == m, $sformatf("mode %s", m.name()));
    chk({clk_en_cpu, clk_en_sram0, clk_en_sram1, clk_en_ibe} == clks,
        $sformatf("%s clocks %b", m.name(), {clk_en_cpu, clk_en_sram0, clk_en_sram1, clk_en_ibe}));
    chk({pwr_eflash, pwr_ibe, pwr_cpu, pwr_sram0, pwr_sram1} == pwr,
        $sformatf("%s power %b", m.name(), {pwr_eflash, pwr_ibe, pwr_cpu, pwr_sram0, pwr_sram1}));
    chk(cpu_rst_n == pwr_cpu, "CPU reset follows CPU power");
    chk(sic_sram_ret == (m == RM_POWERDOWN), "SIC SRAM retention");
    chk(!busy, "sequence finished");
  endtask

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    expect_mode(RM_NORMAL, 4'b1111, 5'b11111);
    request(RM_LOWPOWER);   expect_mode(RM_LOWPOWER, 4'b0000, 5'b00110);
    @(negedge clk); cpu_exception = 1; @(negedge clk); cpu_exception = 0;
    repeat (DLY + 6) @(negedge clk);
    expect_mode(RM_NORMAL, 4'b1111, 5'b11111);
    request(RM_SLEEP);      expect_mode(RM_SLEEP, 4'b0000, 5'b00110);
    @(negedge clk); ext_event = 1; @(negedge clk); ext_event = 0;
    repeat (DLY + 6) @(negedge clk);
    expect_mode(RM_NORMAL, 4'b1111, 5'b11111);
    // power-down order: isolation first
    @(negedge clk); runmode_valid = 1; runmode = RM_DOWNACTIVE;
    @(negedge clk); runmode_valid = 0;
    @(negedge clk);
    chk(iso_en == 5'b11111 && pwr_cpu, "isolation raised while still powered");
    @(negedge clk);
    chk(!pwr_cpu && !cpu_rst_n, "power removed after isolation");
    repeat (DLY + 6) @(negedge clk);
    expect_mode(RM_DOWNACTIVE, 4'b0000, 5'b00000);
    @(negedge clk); cpu_exception = 1; ext_event = 1; @(negedge clk); cpu_exception = 0; ext_event = 0;
    repeat (5) @(negedge clk);
    chk(mode == RM_DOWNACTIVE, "exception does not leave down-active");
    request(RM_POWERDOWN);  expect_mode(RM_POWERDOWN, 4'b0000, 5'b00000);
    // reboot: power on, wait, release isolation and reset
    @(negedge clk); runmode_valid = 1; runmode = RM_NORMAL;
    @(negedge clk); runmode_valid = 0;
    t0 = cyc;
    while (!pwr_cpu) @(negedge clk);
    while (iso_en[2]) @(negedge clk);
    chk(cyc - t0 >= DLY, $sformatf("isolation held %0d cycles after power-up", cyc - t0));
    while (!cpu_rst_n) @(negedge clk);
    repeat (3) @(negedge clk);
    expect_mode(RM_NORMAL, 4'b1111, 5'b11111);
    user_clk_en = 3'b010; #1;
    chk(!clk_en_ibe && clk_en_sram0 && !clk_en_sram1, "software clock gating");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
