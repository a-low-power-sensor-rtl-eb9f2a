// clk_gate: integrated clock gate. The enable is captured by a latch that is
// transparent while clk is low, so gclk = clk & enable never glitches. Used
// by the PMU's per-IP clock gating of the IBE. The latch is intended: it is
// the standard structure of a clock-gating cell.
module clk_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_l;
  always_latch begin
    if (!clk) en_l = en;
  end
  assign gclk = clk & en_l;
endmodule
