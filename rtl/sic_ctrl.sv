// sic_ctrl: the Sensor Interface Controller's hard-wired state machine,
// which takes over sensor monitoring from the CPU so the CPU, its SRAM and
// the IBE can be clock- or power-gated. Two state machines share the clock:
//
//  Command decoder. Every SPI frame from the host starts with a command byte
//  (codes in slh_pkg):
//    WRCFG a d   write configuration register a
//    RDCFG a     next byte returns configuration register a
//    RUNMODE m   request run mode m from the PMU (power control of the SoC)
//    READ h l    following bytes return sensor SRAM bytes from address h:l on
//    STATUS      following bytes return interrupt status (then cleared),
//                current run mode, write pointer high and low
//    MONITOR x   x[0] starts / stops monitoring, x[1] also rewinds the
//                write pointer and sample count
//  Reply bytes are prepared in the clock cycles after a byte is received.
//
//  Monitor. While monitoring is on and the run mode lets the SIC monitor
//  (normal, low-power and down-active; sleep and power-down are the SIC's
//  stand-by modes), every PERIOD x 256 clocks it reads NBYTES bytes from
//  register REG of I2C device DEV (START, DEV+W, REG, repeated START, DEV+R,
//  reads, STOP) and stores them in the sensor SRAM at a wrapping write
//  pointer. After THRESH samples it raises the sensor-data-ready interrupt.
//
// Interrupts (status bits, each gated by INTEN): sensor data ready; CPU
// wake-up (a run mode request returns the CPU from sleep to normal);
// power control (a request enters or leaves the modes that switch CPU power
// off); run mode (any run mode change). The command set follows the list in
// the source design (run-mode, read sensor data, interrupt status, monitor
// control); codes, framing and register layout are this design's own.
module sic_ctrl
  import slh_pkg::*;
#(
  parameter int unsigned BYTES = 1024,
  localparam int unsigned AW = $clog2(BYTES)
) (
  input  logic          clk,
  input  logic          rst_n,
  // SPI slave
  input  logic          rx_valid,
  input  logic [7:0]    rx_data,
  input  logic          rx_first,
  output logic [7:0]    tx_data,
  // I2C master
  output logic          i2c_valid,
  input  logic          i2c_ready,
  output logic [1:0]    i2c_cmd,
  output logic [7:0]    i2c_wdata,
  output logic          i2c_nack_out,
  input  logic          i2c_done,
  input  logic [7:0]    i2c_rdata,
  input  logic          i2c_nack,
  // sensor SRAM, port A
  output logic          ram_en,
  output logic          ram_we,
  output logic [AW-1:0] ram_addr,
  output logic [7:0]    ram_wdata,
  input  logic [7:0]    ram_rdata,
  // run mode and interrupts
  output logic          sic_runmode_valid,
  output runmode_e      sic_current_runmode,
  output logic          sic_intr_sdready,
  output logic          sic_intr_cpu_wic,
  output logic          sic_intr_powerctrl,
  output logic          sic_intr_runmode,
  output logic          monitoring
);
  // ---------------- configuration and status ----------------
  logic [6:0]  cfg_dev;
  logic [7:0]  cfg_reg, cfg_period, cfg_thresh;
  logic [3:0]  cfg_nbytes, cfg_inten;
  logic [3:0]  irq_stat;
  logic        mon_on;
  logic [AW-1:0] wptr;
  logic [7:0]  samples;

  function automatic logic [7:0] cfg_read(input logic [7:0] a);
    unique case (a)
      SIC_CFG_DEV:    return {1'b0, cfg_dev};
      SIC_CFG_REG:    return cfg_reg;
      SIC_CFG_NBYTES: return {4'd0, cfg_nbytes};
      SIC_CFG_PERIOD: return cfg_period;
      SIC_CFG_THRESH: return cfg_thresh;
      SIC_CFG_INTEN:  return {4'd0, cfg_inten};
      default:        return 8'h00;
    endcase
  endfunction

  function automatic logic cpu_off(input runmode_e m);
    return (m == RM_DOWNACTIVE) || (m == RM_POWERDOWN);
  endfunction

  assign sic_intr_sdready   = irq_stat[SIC_IRQ_SDREADY] && cfg_inten[SIC_IRQ_SDREADY];
  assign sic_intr_cpu_wic   = irq_stat[SIC_IRQ_CPUWIC]  && cfg_inten[SIC_IRQ_CPUWIC];
  assign sic_intr_powerctrl = irq_stat[SIC_IRQ_PWRCTRL] && cfg_inten[SIC_IRQ_PWRCTRL];
  assign sic_intr_runmode   = irq_stat[SIC_IRQ_RUNMODE] && cfg_inten[SIC_IRQ_RUNMODE];
  assign monitoring = mon_on && (sic_current_runmode == RM_NORMAL ||
                                 sic_current_runmode == RM_LOWPOWER ||
                                 sic_current_runmode == RM_DOWNACTIVE);

  // ---------------- command decoder ----------------
  logic [7:0]    cmd_q, arg_q;
  logic [2:0]    idx;           // bytes received after the command byte
  logic [AW-1:0] raddr;
  logic          rd_pend;       // SPI read of the SRAM issued last cycle
  logic [3:0]    snap;

  // monitor side of the SRAM port
  logic          mw_pend;
  logic [7:0]    mw_data;
  logic          spi_rd;        // SPI wants the SRAM this cycle
  logic          set_sdready;

  always_comb begin
    spi_rd = 1'b0;
    if (rx_valid && !rx_first && cmd_q == SIC_CMD_READ && idx >= 3'd1) spi_rd = 1'b1;
    ram_en    = spi_rd || mw_pend;
    ram_we    = !spi_rd && mw_pend;
    ram_addr  = spi_rd ? ((idx == 3'd1) ? {raddr[AW-1:8], rx_data} : raddr) : wptr;
    ram_wdata = mw_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_dev <= '0; cfg_reg <= '0; cfg_nbytes <= 4'd1; cfg_period <= 8'd1;
      cfg_thresh <= 8'd1; cfg_inten <= '0; mon_on <= 1'b0;
      cmd_q <= '0; arg_q <= '0; idx <= '0; raddr <= '0; rd_pend <= 1'b0;
      tx_data <= '0; snap <= '0; irq_stat <= '0;
      sic_runmode_valid <= 1'b0; sic_current_runmode <= RM_NORMAL;
    end else begin
      sic_runmode_valid <= 1'b0;
      rd_pend <= spi_rd;
      if (rd_pend) tx_data <= ram_rdata;
      if (set_sdready) irq_stat[SIC_IRQ_SDREADY] <= 1'b1;
      if (rx_valid) begin
        if (rx_first) begin
          cmd_q   <= rx_data;
          idx     <= '0;
          tx_data <= 8'h00;
          if (rx_data == SIC_CMD_STATUS) begin
            snap     <= irq_stat;
            tx_data  <= {4'd0, irq_stat};
            irq_stat <= set_sdready ? 4'b0001 : 4'b0000;
          end
        end else begin
          if (idx != 3'd7) idx <= idx + 3'd1;
          unique case (cmd_q)
            SIC_CMD_WRCFG:
              if (idx == 3'd0) arg_q <= rx_data;
              else if (idx == 3'd1) unique case (arg_q)
                SIC_CFG_DEV:    cfg_dev    <= rx_data[6:0];
                SIC_CFG_REG:    cfg_reg    <= rx_data;
                SIC_CFG_NBYTES: cfg_nbytes <= rx_data[3:0];
                SIC_CFG_PERIOD: cfg_period <= rx_data;
                SIC_CFG_THRESH: cfg_thresh <= rx_data;
                SIC_CFG_INTEN:  cfg_inten  <= rx_data[3:0];
                default: ;
              endcase
            SIC_CMD_RDCFG:
              if (idx == 3'd0) tx_data <= cfg_read(rx_data);
            SIC_CMD_RUNMODE:
              if (idx == 3'd0 && rx_data <= 8'd4) begin
                sic_current_runmode <= runmode_e'(rx_data[2:0]);
                sic_runmode_valid   <= 1'b1;
                if (runmode_e'(rx_data[2:0]) != sic_current_runmode) begin
                  irq_stat[SIC_IRQ_RUNMODE] <= 1'b1;
                  if (cpu_off(runmode_e'(rx_data[2:0])) != cpu_off(sic_current_runmode))
                    irq_stat[SIC_IRQ_PWRCTRL] <= 1'b1;
                  if (runmode_e'(rx_data[2:0]) == RM_NORMAL &&
                      (sic_current_runmode == RM_LOWPOWER || sic_current_runmode == RM_SLEEP))
                    irq_stat[SIC_IRQ_CPUWIC] <= 1'b1;
                end
              end
            SIC_CMD_READ:
              if (idx == 3'd0) raddr <= {rx_data[AW-9:0], 8'h00};
              else raddr <= ram_addr + AW'(1);
            SIC_CMD_STATUS:
              unique case (idx)
                3'd0:    tx_data <= {5'd0, sic_current_runmode};
                3'd1:    tx_data <= 8'(wptr >> 8);
                3'd2:    tx_data <= wptr[7:0];
                default: tx_data <= {4'd0, snap};
              endcase
            SIC_CMD_MONITOR:
              if (idx == 3'd0) mon_on <= rx_data[0];
            default: ;
          endcase
        end
      end
    end
  end

  // ---------------- monitor ----------------
  typedef enum logic [2:0] {M_IDLE, M_START, M_ADDRW, M_REG, M_RSTART, M_ADDRR, M_READ, M_STOP} mstate_e;
  mstate_e    mst;
  logic       m_wait;
  logic [15:0] timer;
  logic [3:0] nread;

  always_comb begin
    i2c_valid    = (mst != M_IDLE) && !m_wait;
    i2c_wdata    = '0;
    i2c_nack_out = 1'b0;
    unique case (mst)
      M_START, M_RSTART: i2c_cmd = 2'd0;
      M_ADDRW: begin i2c_cmd = 2'd1; i2c_wdata = {cfg_dev, 1'b0}; end
      M_REG:   begin i2c_cmd = 2'd1; i2c_wdata = cfg_reg; end
      M_ADDRR: begin i2c_cmd = 2'd1; i2c_wdata = {cfg_dev, 1'b1}; end
      M_READ:  begin i2c_cmd = 2'd2; i2c_nack_out = (nread + 4'd1 >= cfg_nbytes); end
      default: i2c_cmd = 2'd3;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mst <= M_IDLE; m_wait <= 1'b0; timer <= '0; nread <= '0;
      wptr <= '0; samples <= '0; mw_pend <= 1'b0; mw_data <= '0; set_sdready <= 1'b0;
    end else begin
      set_sdready <= 1'b0;
      if (mw_pend && !spi_rd) begin
        mw_pend <= 1'b0;
        wptr    <= wptr + AW'(1);
      end
      if (rx_valid && !rx_first && cmd_q == SIC_CMD_MONITOR && idx == 3'd0 && rx_data[1]) begin
        wptr    <= '0;
        samples <= '0;
      end
      if (i2c_valid && i2c_ready) m_wait <= 1'b1;
      unique case (mst)
        M_IDLE: begin
          if (monitoring) begin
            if (timer != 16'd0) timer <= timer - 16'd1;
            else begin
              timer <= {cfg_period, 8'd0} - 16'd1;
              nread <= '0;
              mst   <= M_START;
            end
          end else timer <= '0;
        end
        default: begin
          if (timer != 16'd0) timer <= timer - 16'd1;
          if (m_wait && i2c_done) begin
            m_wait <= 1'b0;
            unique case (mst)
              M_START:  mst <= M_ADDRW;
              M_ADDRW:  mst <= i2c_nack ? M_STOP : M_REG;
              M_REG:    mst <= i2c_nack ? M_STOP : M_RSTART;
              M_RSTART: mst <= M_ADDRR;
              M_ADDRR:  mst <= i2c_nack ? M_STOP : M_READ;
              M_READ: begin
                mw_pend <= 1'b1;
                mw_data <= i2c_rdata;
                nread   <= nread + 4'd1;
                if (nread + 4'd1 >= cfg_nbytes) begin
                  mst <= M_STOP;
                  if (samples + 8'd1 >= cfg_thresh) begin
                    samples     <= '0;
                    set_sdready <= 1'b1;
                  end else samples <= samples + 8'd1;
                end
              end
              default: mst <= M_IDLE;
            endcase
          end
        end
      endcase
    end
  end
endmodule
