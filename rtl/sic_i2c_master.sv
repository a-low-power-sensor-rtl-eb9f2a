// sic_i2c_master: the SIC's I2C channel to the sensors. A byte-level master:
// the SIC controller issues START (also used as repeated START), WRITE of a
// byte (returns the slave's acknowledge), READ of a byte (answering ACK, or
// NACK on the last byte) and STOP. Each bit takes four quarter periods of
// CLK_DIV clocks: SCL low with SDA set up, SCL high, SCL high with SDA
// sampled at the end, SCL low. SCL and SDA are open-drain: scl_oe / sda_oe
// pull the line low, otherwise it is released to the pull-up.
// Handshake: cmd_valid with cmd_ready starts a command; done pulses when it
// has finished, with rdata (READ) and nack (WRITE) valid from then on.
// The source design only says the SIC monitors sensors over an internal I2C
// channel; this master (no clock stretching, single master) is this
// design's choice.
module sic_i2c_master #(
  parameter int unsigned CLK_DIV = 16   // clocks per quarter SCL period
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cmd_valid,
  output logic       cmd_ready,
  input  logic [1:0] cmd,          // 0 START, 1 WRITE, 2 READ, 3 STOP
  input  logic [7:0] wdata,
  input  logic       send_nack,    // READ: answer NACK instead of ACK
  output logic       done,
  output logic [7:0] rdata,
  output logic       nack,         // WRITE: the slave did not acknowledge
  output logic       scl_oe,
  output logic       sda_oe,
  input  logic       sda_i
);
  localparam logic [1:0] C_START = 2'd0, C_WRITE = 2'd1, C_READ = 2'd2, C_STOP = 2'd3;
  localparam int unsigned DW = $clog2(CLK_DIV + 1);

  logic          busy;
  logic [1:0]    cmd_q, quarter;
  logic [3:0]    bit_q;           // 0..8 within a byte
  logic [DW-1:0] div;
  logic [8:0]    sh;              // bits to send; 1 = released
  logic [7:0]    rx;
  logic          scl_q, sda_q;
  logic          tick;

  assign cmd_ready = !busy;
  assign scl_oe    = !scl_q;
  assign sda_oe    = !sda_q;
  assign tick      = (div == DW'(CLK_DIV - 1));

  // line levels for the current quarter
  function automatic logic [1:0] levels(input logic [1:0] c, input logic [1:0] q, input logic b);
    // returns {scl, sda}
    unique case (c)
      C_START: unique case (q)
        2'd0: return 2'b01;
        2'd1: return 2'b11;
        2'd2: return 2'b10;
        default: return 2'b00;
      endcase
      C_STOP: unique case (q)
        2'd0: return 2'b00;
        2'd1: return 2'b10;
        default: return 2'b11;
      endcase
      default: unique case (q)
        2'd0, 2'd3: return {1'b0, b};
        default:    return {1'b1, b};
      endcase
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cmd_q <= C_START; quarter <= '0; bit_q <= '0; div <= '0;
      sh <= '1; rx <= '0; scl_q <= 1'b1; sda_q <= 1'b1;
      done <= 1'b0; rdata <= '0; nack <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (cmd_valid) begin
          busy    <= 1'b1;
          cmd_q   <= cmd;
          quarter <= '0;
          bit_q   <= '0;
          div     <= '0;
          sh <= (cmd == C_WRITE) ? {wdata, 1'b1} : {8'hff, send_nack};
          {scl_q, sda_q} <= levels(cmd, 2'd0, (cmd == C_WRITE) ? wdata[7] : 1'b1);
        end
      end else begin
        div <= div + DW'(1);
        if (tick) begin
          div <= '0;
          // sample SDA at the end of the second high quarter
          if (quarter == 2'd2 && (cmd_q == C_WRITE || cmd_q == C_READ)) begin
            if (bit_q < 4'd8) rx <= {rx[6:0], sda_i};
            else if (cmd_q == C_WRITE) nack <= sda_i;
          end
          if (quarter == 2'd3) begin
            if (cmd_q == C_START || cmd_q == C_STOP || bit_q == 4'd8) begin
              busy <= 1'b0;
              done <= 1'b1;
              if (cmd_q == C_READ) rdata <= rx;
            end else begin
              bit_q   <= bit_q + 4'd1;
              sh      <= {sh[7:0], 1'b1};
              quarter <= 2'd0;
              {scl_q, sda_q} <= levels(cmd_q, 2'd0, sh[7]);
            end
          end else begin
            quarter <= quarter + 2'd1;
            {scl_q, sda_q} <= levels(cmd_q, quarter + 2'd1, sh[8]);
          end
        end
      end
    end
  end
endmodule
