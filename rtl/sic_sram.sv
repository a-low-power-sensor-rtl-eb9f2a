// sic_sram: the SIC's 1 KB dual-port sensor-data SRAM (1024 x 8). Port A
// belongs to the SIC controller, port B to the internal MCU, so the CPU can
// pick up sensor data without going through the SIC. Both ports read and
// write; a read returns data one clock after the enable. A write and a read
// of the same byte in one cycle on different ports return the old data.
// Written as a synthesizable array in place of the foundry dual-port macro;
// in power-down mode the real macro is held in retention by the PMU, which
// this model keeps by simply holding its contents.
module sic_sram #(
  parameter int unsigned BYTES = 1024,
  localparam int unsigned AW = $clog2(BYTES)
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [7:0]    a_wdata,
  output logic [7:0]    a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [7:0]    b_wdata,
  output logic [7:0]    b_rdata
);
  logic [7:0] mem [BYTES];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end
endmodule
