// sic_spi_slave: the SIC's SPI channel to the host CPU, through which the
// host sends SIC commands and reads sensor data. SPI mode 0 (data sampled on
// the rising SCLK edge, changed on the falling edge), MSB first, 8-bit
// bytes, active-low slave select. The source design only states that the
// host talks to the SIC over SPI; mode, framing and the oversampling scheme
// are this design's choices.
// SCLK, SS_n and MOSI are synchronised into the SIC clock domain with two
// flip-flops and edge-detected, so SCLK must be at most clk/8.
// rx_valid pulses for one clock when a byte has arrived, with rx_first set
// for the first byte after SS_n fell. tx_data is sampled when SS_n falls and
// at the falling SCLK edge that follows each received byte, so the user has
// at least two clock cycles after rx_valid to present the next reply byte.
module sic_spi_slave (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sclk,
  input  logic       ss_n,
  input  logic       mosi,
  output logic       miso,
  output logic       rx_valid,
  output logic [7:0] rx_data,
  output logic       rx_first,
  output logic       active,      // a frame is in progress (SS_n low)
  input  logic [7:0] tx_data
);
  logic [2:0] sclk_s, ss_s;
  logic [1:0] mosi_s;
  logic [6:0] rx_sh;
  logic [7:0] tx_sh;
  logic [2:0] bitcnt;
  logic       first, reload;
  logic       rise, fall, ss_fall;

  assign rise    = sclk_s[1] && !sclk_s[2];
  assign fall    = !sclk_s[1] && sclk_s[2];
  assign ss_fall = !ss_s[1] && ss_s[2];
  assign active  = !ss_s[1];
  assign miso    = tx_sh[7];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0; ss_s <= '1; mosi_s <= '0;
      rx_sh <= '0; tx_sh <= '0; bitcnt <= '0; first <= 1'b0; reload <= 1'b0;
      rx_valid <= 1'b0; rx_data <= '0; rx_first <= 1'b0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      ss_s   <= {ss_s[1:0], ss_n};
      mosi_s <= {mosi_s[0], mosi};
      rx_valid <= 1'b0;
      if (ss_s[1]) begin
        bitcnt <= '0;
        reload <= 1'b0;
      end else if (ss_fall) begin
        bitcnt <= '0;
        first  <= 1'b1;
        reload <= 1'b0;
        tx_sh  <= tx_data;
      end else begin
        if (rise) begin
          rx_sh  <= {rx_sh[5:0], mosi_s[1]};
          bitcnt <= bitcnt + 3'd1;
          if (bitcnt == 3'd7) begin
            rx_valid <= 1'b1;
            rx_data  <= {rx_sh, mosi_s[1]};
            rx_first <= first;
            first    <= 1'b0;
            reload   <= 1'b1;
          end
        end
        if (fall) begin
          if (reload) begin
            tx_sh  <= tx_data;
            reload <= 1'b0;
          end else begin
            tx_sh <= {tx_sh[6:0], 1'b0};
          end
        end
      end
    end
  end
endmodule
