// i2c_sensor_model: behavioural model of an I2C sensor for the testbenches
// (not synthesizable design). It answers at 7-bit address DEV_ADDR, keeps
// 256 byte registers with an auto-incrementing pointer (first written byte
// sets the pointer, further written bytes are stored), and returns register
// bytes on reads until the master answers NACK. The bus is sampled on clk,
// which must be much faster than SCL. Register r starts at INIT + r; reads
// from register 0x80 upward return a counter that advances on every read,
// like a sensor's data output.
module i2c_sensor_model #(
  parameter logic [6:0] DEV_ADDR = 7'h68,
  parameter logic [7:0] INIT = 8'h10
) (
  input  logic clk,
  input  logic scl,       // bus levels
  input  logic sda,
  output logic sda_oe,    // pulls SDA low
  output int   reads,     // bytes sent
  output int   addr_hits  // address phases acknowledged
);
  typedef enum logic [2:0] {I_IDLE, I_ADDR, I_WDATA, I_READ, I_IGNORE} istate_e;
  istate_e st = I_IDLE;
  logic scl_p = 1, sda_p = 1;
  logic [7:0] sh = 0, ptr = 0, regs [256], sample = 0;
  int bitcnt = 0;
  logic ack_phase = 0, rw = 0, first = 0, mack = 0;

  initial begin
    sda_oe = 0; reads = 0; addr_hits = 0;
    for (int i = 0; i < 256; i++) regs[i] = INIT + 8'(i);
  end

  function automatic logic [7:0] rd_reg(input logic [7:0] p);
    if (p >= 8'h80) begin
      sample = sample + 8'd3;
      return sample + p;
    end
    return regs[p];
  endfunction

  always @(posedge clk) begin
    scl_p <= scl;
    sda_p <= sda;
    if (scl && scl_p && sda_p && !sda) begin            // START
      st <= I_ADDR; bitcnt <= 0; ack_phase <= 0; sda_oe <= 0;
    end else if (scl && scl_p && !sda_p && sda) begin   // STOP
      st <= I_IDLE; sda_oe <= 0; ack_phase <= 0;
    end else if (scl && !scl_p) begin                   // rising SCL
      if ((st == I_ADDR || st == I_WDATA) && !ack_phase && bitcnt < 8) begin
        sh <= {sh[6:0], sda};
        bitcnt <= bitcnt + 1;
      end else if (st == I_READ) begin
        if (bitcnt < 8) bitcnt <= bitcnt + 1;
        else begin
          mack <= sda;
          bitcnt <= 9;
        end
      end
    end else if (!scl && scl_p) begin                   // falling SCL
      if ((st == I_ADDR || st == I_WDATA) && !ack_phase && bitcnt == 8) begin
        if (st == I_ADDR) begin
          if (sh[7:1] == DEV_ADDR) begin
            sda_oe <= 1; ack_phase <= 1; rw <= sh[0]; first <= 1;
            addr_hits <= addr_hits + 1;
          end else st <= I_IGNORE;
        end else begin
          if (first) ptr <= sh;
          else begin regs[ptr] <= sh; ptr <= ptr + 1; end
          first <= 0;
          sda_oe <= 1; ack_phase <= 1;
        end
      end else if (ack_phase) begin
        ack_phase <= 0;
        bitcnt <= 0;
        if (st == I_ADDR && rw) begin
          logic [7:0] v;
          v = rd_reg(ptr);
          ptr <= ptr + 1;
          sh <= v;
          sda_oe <= !v[7];
          reads <= reads + 1;
          st <= I_READ;
        end else begin
          sda_oe <= 0;
          st <= I_WDATA;
        end
      end else if (st == I_READ) begin
        if (bitcnt < 8) sda_oe <= !sh[7 - bitcnt];
        else if (bitcnt == 8) sda_oe <= 0;               // master's acknowledge bit
        else begin
          if (!mack) begin
            logic [7:0] v;
            v = rd_reg(ptr);
            ptr <= ptr + 1;
            sh <= v;
            sda_oe <= !v[7];
            reads <= reads + 1;
            bitcnt <= 0;
          end else begin
            sda_oe <= 0;
            st <= I_IGNORE;
          end
        end
      end
    end
  end
endmodule
