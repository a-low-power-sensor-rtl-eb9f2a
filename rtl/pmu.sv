// pmu: power management unit. It holds the SoC run mode and turns it into
// clock enables, domain power enables, isolation, the CPU reset and the
// retention request of the SIC SRAM, following the source design's table:
//   mode         clocks gated        domains powered off        CPU wake-up
//   normal       -                   -                          -
//   low-power    CPU, SRAM#0         eFlash, IBE, SRAM#1        exception, event, SIC
//   sleep        CPU, SRAM#0, #1     eFlash, IBE, SRAM#1        exception, event, SIC
//   down-active  -                   eFlash, IBE, CPU, SRAM#0,1 SIC (reboot)
//   power-down   -                   as down-active, SIC SRAM in retention
// The host selects the mode through the SIC (runmode_valid/runmode). In
// low-power and sleep an exception or external event returns to normal; in
// the two CPU-off modes only the SIC can, and the CPU then reboots.
// Sequencing (this design's choice, the source design gives no timing):
// switching a domain off first raises its isolation, then removes power the
// next cycle; switching on applies power, waits PWR_DLY cycles for the
// switches to settle, drops isolation, and the CPU reset is released one
// cycle after the CPU domain is isolated no more. user_clk_en lets software
// gate the IBE and SRAM clocks individually on top of the mode table.
module pmu
  import slh_pkg::*;
#(
  parameter int unsigned PWR_DLY = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      runmode_valid,
  input  runmode_e  runmode,
  input  logic      cpu_exception,
  input  logic      ext_event,
  input  logic [2:0] user_clk_en,   // [0] IBE, [1] SRAM#0, [2] SRAM#1
  output runmode_e  mode,
  output logic      clk_en_cpu,
  output logic      clk_en_sram0,
  output logic      clk_en_sram1,
  output logic      clk_en_ibe,
  output logic      pwr_eflash,
  output logic      pwr_ibe,
  output logic      pwr_cpu,
  output logic      pwr_sram0,
  output logic      pwr_sram1,
  output logic [4:0] iso_en,        // per domain: eflash, ibe, cpu, sram0, sram1
  output logic      cpu_rst_n,
  output logic      sic_sram_ret,
  output logic      busy            // a power sequence is in progress
);
  // domain bit order
  localparam int unsigned D_EFL = 0, D_IBE = 1, D_CPU = 2, D_SR0 = 3, D_SR1 = 4;

  typedef enum logic [1:0] {P_STABLE, P_OFF, P_ON} pstate_e;
  pstate_e    pst;
  logic [4:0] pwr_q, iso_q, tgt, off, on;
  logic [$clog2(PWR_DLY+1)-1:0] cnt;
  logic       rst_q;

  function automatic logic [4:0] power_of(input runmode_e m);
    unique case (m)
      RM_LOWPOWER, RM_SLEEP:       return 5'b01100;  // CPU and SRAM#0 stay on
      RM_DOWNACTIVE, RM_POWERDOWN: return 5'b00000;
      default:                     return 5'b11111;
    endcase
  endfunction

  always_comb begin
    tgt = power_of(mode);
    off = pwr_q & ~tgt;
    on  = tgt & ~pwr_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode  <= RM_NORMAL;
      pst   <= P_STABLE;
      pwr_q <= '1;
      iso_q <= '0;
      cnt   <= '0;
      rst_q <= 1'b0;
    end else begin
      // mode selection
      if (runmode_valid)
        mode <= runmode;
      else if ((mode == RM_LOWPOWER || mode == RM_SLEEP) && (cpu_exception || ext_event))
        mode <= RM_NORMAL;
      // power sequencing
      unique case (pst)
        P_STABLE:
          if (off != '0) begin
            iso_q <= iso_q | off;
            pst   <= P_OFF;
          end else if (on != '0) begin
            pwr_q <= pwr_q | on;
            cnt   <= PWR_DLY[$bits(cnt)-1:0];
            pst   <= P_ON;
          end
        P_OFF: begin
          pwr_q <= pwr_q & ~iso_q;
          pst   <= P_STABLE;
        end
        P_ON: begin
          if (cnt != '0) cnt <= cnt - 1'b1;
          else begin
            iso_q <= iso_q & ~pwr_q;
            pst   <= P_STABLE;
          end
        end
        default: pst <= P_STABLE;
      endcase
      rst_q <= pwr_q[D_CPU] && !iso_q[D_CPU];
    end
  end

  assign busy         = (pst != P_STABLE);
  assign pwr_eflash   = pwr_q[D_EFL];
  assign pwr_ibe      = pwr_q[D_IBE];
  assign pwr_cpu      = pwr_q[D_CPU];
  assign pwr_sram0    = pwr_q[D_SR0];
  assign pwr_sram1    = pwr_q[D_SR1];
  assign iso_en       = iso_q;
  assign cpu_rst_n    = rst_q;
  assign sic_sram_ret = (mode == RM_POWERDOWN);
  assign clk_en_cpu   = (mode == RM_NORMAL) && pwr_q[D_CPU] && !iso_q[D_CPU];
  assign clk_en_sram0 = (mode == RM_NORMAL) && pwr_q[D_SR0] && !iso_q[D_SR0] && user_clk_en[1];
  assign clk_en_sram1 = (mode == RM_NORMAL) && pwr_q[D_SR1] && !iso_q[D_SR1] && user_clk_en[2];
  assign clk_en_ibe   = pwr_q[D_IBE] && !iso_q[D_IBE] && user_clk_en[0];

  // a powered-off domain is always isolated
  a_iso_when_off: assert property (@(posedge clk) disable iff (!rst_n) ((~pwr_q & ~iso_q) == '0));
endmodule
