// fp32_mul: IEEE-754 single-precision multiplier, purely combinational.
// Each IBE processing element holds one. The source design only states that
// the engine works in single precision; the rounding behaviour is this
// design's choice: results are truncated (round toward zero), denormal
// inputs and results are flushed to signed zero, an overflow gives infinity
// and any NaN input, or zero times infinity, gives the quiet NaN 7fc00000.
// Ports: a, b operands, y = a * b, no clock.
module fp32_mul
  import slh_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);
  logic        sa, sb, sy;
  logic [7:0]  ea, eb;
  logic [23:0] ma, mb;
  logic [47:0] prod;
  logic [9:0]  ey;          // signed, biased exponent of the result
  logic [22:0] my;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

  always_comb begin
    sa = a[31]; sb = b[31]; sy = sa ^ sb;
    ea = a[30:23]; eb = b[30:23];
    ma = {1'b1, a[22:0]}; mb = {1'b1, b[22:0]};
    a_zero = (ea == 8'd0); b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hff) && (a[22:0] == '0);
    b_inf  = (eb == 8'hff) && (b[22:0] == '0);
    a_nan  = (ea == 8'hff) && (a[22:0] != '0);
    b_nan  = (eb == 8'hff) && (b[22:0] != '0);
    prod   = ma * mb;
    if (prod[47]) begin
      my = prod[46:24];
      ey = 10'(ea) + 10'(eb) - 10'd126;
    end else begin
      my = prod[45:23];
      ey = 10'(ea) + 10'(eb) - 10'd127;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      y = 32'h7fc0_0000;
    else if (a_inf || b_inf)
      y = {sy, 8'hff, 23'd0};
    else if (a_zero || b_zero)
      y = {sy, 31'd0};
    else if (ey[9] || ey == 10'd0)          // underflow: flush to zero
      y = {sy, 31'd0};
    else if (ey >= 10'd255)                 // overflow
      y = {sy, 8'hff, 23'd0};
    else
      y = {sy, ey[7:0], my};
  end
endmodule
