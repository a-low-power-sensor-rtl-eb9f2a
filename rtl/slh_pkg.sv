// slh_pkg: types and constants shared by the sensor hub blocks.
// The IBE works on 12x12 single-precision matrices with 12 processing
// elements (both numbers follow the source design). The operation codes of
// the PEs, the register map of the IBE and the SIC command codes are this
// design's own choices. Run modes follow the five modes of the power table.
package slh_pkg;

  typedef logic [31:0] fp32_t;

  localparam int unsigned IBE_DIM = 12;   // largest matrix edge
  localparam int unsigned IBE_NPE = 12;   // MAC units in the PE array
  localparam int unsigned IBE_WORDS = IBE_DIM * IBE_DIM;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_ONE  = 32'h3f80_0000;

  // IBE operating modes (mode numbers of the source design)
  typedef enum logic [2:0] {
    IBE_MM   = 3'd0,   // R = A * B
    IBE_TR   = 3'd1,   // R = A^T
    IBE_MMT  = 3'd2,   // R = A * B^T  (SVM linear)
    IBE_VS   = 3'd3,   // R = V * scalar
    IBE_DOT  = 3'd4,   // RES += V1 . V2
    IBE_SVM  = 3'd5,   // RES = (s1 * (V1 . V2) + s2) ^ exp
    IBE_KNN  = 3'd6    // RES += sum (V1 - V2)^2
  } ibe_mode_e;

  // Processing-element operations
  typedef enum logic [2:0] {
    PE_NOP    = 3'd0,  // hold
    PE_CLR    = 3'd1,  // acc = 0
    PE_LOAD   = 3'd2,  // acc = b
    PE_MAC    = 3'd3,  // acc = acc + a*b
    PE_MUL    = 3'd4,  // acc = a*b
    PE_SQD    = 3'd5,  // acc = acc + (a-b)^2
    PE_MULACC = 3'd6   // acc = acc * a
  } pe_op_e;

  // IBE register map (byte offsets on the APB port)
  localparam logic [11:0] IBE_R_CTRL    = 12'h000; // [0] start, [1] zero-skip enable, [6:4] mode
  localparam logic [11:0] IBE_R_STATUS  = 12'h004; // [0] busy, [1] done (write 1 to clear), [2] dma busy, [3] dma done
  localparam logic [11:0] IBE_R_DIM     = 12'h008; // [3:0] M, [11:8] K, [19:16] N, [31:24] vector length L
  localparam logic [11:0] IBE_R_SCALAR1 = 12'h00C;
  localparam logic [11:0] IBE_R_SCALAR2 = 12'h010;
  localparam logic [11:0] IBE_R_EXP     = 12'h014; // integer exponent of SVM polynomial mode
  localparam logic [11:0] IBE_R_RESULT  = 12'h018; // scalar result of modes 4-6
  localparam logic [11:0] IBE_R_CYCLES  = 12'h01C; // cycles taken by the last operation
  localparam logic [11:0] IBE_R_IRQEN   = 12'h020; // [0] done interrupt enable
  localparam logic [11:0] IBE_R_SKIPS   = 12'h024; // elements skipped by zero skipping, last operation
  localparam logic [11:0] IBE_R_DMASRC  = 12'h030; // system byte address
  localparam logic [11:0] IBE_R_DMABUF  = 12'h034; // [9:8] buffer (0 A, 1 B, 2 R), [7:0] first word
  localparam logic [11:0] IBE_R_DMALEN  = 12'h038; // words
  localparam logic [11:0] IBE_R_DMACTL  = 12'h03C; // [0] start, [1] direction (0 memory->buffer, 1 buffer->memory)
  localparam logic [1:0]  IBE_WIN_A = 2'd1;        // 0x400.. A buffer window
  localparam logic [1:0]  IBE_WIN_B = 2'd2;        // 0x800.. B buffer window
  localparam logic [1:0]  IBE_WIN_R = 2'd3;        // 0xC00.. result buffer window

  // Run modes of the SoC
  typedef enum logic [2:0] {
    RM_NORMAL     = 3'd0,
    RM_LOWPOWER   = 3'd1,
    RM_SLEEP      = 3'd2,
    RM_DOWNACTIVE = 3'd3,
    RM_POWERDOWN  = 3'd4
  } runmode_e;

  // SIC commands received over SPI (first byte of a frame)
  localparam logic [7:0] SIC_CMD_WRCFG   = 8'h10; // addr, data: write a configuration register
  localparam logic [7:0] SIC_CMD_RUNMODE = 8'h20; // mode: request a run mode
  localparam logic [7:0] SIC_CMD_READ    = 8'h30; // addr_hi, addr_lo, then read bytes from the sensor SRAM
  localparam logic [7:0] SIC_CMD_STATUS  = 8'h40; // then read: interrupt status, run mode, write pointer hi, lo
  localparam logic [7:0] SIC_CMD_MONITOR = 8'h50; // 1 start / 0 stop monitoring
  localparam logic [7:0] SIC_CMD_RDCFG   = 8'h60; // addr, then read the register

  // SIC configuration registers
  localparam logic [7:0] SIC_CFG_DEV     = 8'h00; // 7-bit I2C device address
  localparam logic [7:0] SIC_CFG_REG     = 8'h01; // first sensor register
  localparam logic [7:0] SIC_CFG_NBYTES  = 8'h02; // bytes per sample (1..15)
  localparam logic [7:0] SIC_CFG_PERIOD  = 8'h03; // sample period, in units of 256 cycles
  localparam logic [7:0] SIC_CFG_THRESH  = 8'h04; // samples before the data-ready interrupt
  localparam logic [7:0] SIC_CFG_INTEN   = 8'h05; // interrupt enables [3:0]

  // SIC interrupt status bits
  localparam int unsigned SIC_IRQ_SDREADY = 0;
  localparam int unsigned SIC_IRQ_CPUWIC  = 1;
  localparam int unsigned SIC_IRQ_PWRCTRL = 2;
  localparam int unsigned SIC_IRQ_RUNMODE = 3;

endpackage
