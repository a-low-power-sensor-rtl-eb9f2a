// sram_sp: one bank of system SRAM (the SoC has two 64 KB banks, SRAM#0 and
// SRAM#1). Single port, 32-bit words with byte enables; a read returns data
// one clock after ce. Written as a synthesizable array standing in for the
// foundry macro; power gating of the bank is applied outside, through ce.
module sram_sp #(
  parameter int unsigned WORDS = 16384,
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          ce,
  input  logic          we,
  input  logic [3:0]    be,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (ce) begin
      if (we)
        for (int i = 0; i < 4; i++)
          if (be[i]) mem[addr][8*i +: 8] <= wdata[8*i +: 8];
      rdata <= mem[addr];
    end
  end
endmodule
