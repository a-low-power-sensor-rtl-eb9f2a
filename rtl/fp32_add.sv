// fp32_add: IEEE-754 single-precision adder / subtractor, combinational.
// y = a + b, or a - b when sub is set. The smaller operand is aligned with
// guard, round and sticky bits, so the truncated result is the exact sum
// rounded toward zero. As in fp32_mul (a choice of this design, the source
// design names only "single precision"), denormals are flushed to zero, an
// exact zero sum is +0, infinities propagate and inf - inf or a NaN input
// gives the quiet NaN 7fc00000.
module fp32_add
  import slh_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t y
);
  logic        sa, sb, sx, sy, eff_sub, swap;
  logic [7:0]  ea, eb, ex, ez, d;
  logic [26:0] mx, mz, mz_sh;  // 1.23 mantissa followed by guard, round, sticky
  logic [27:0] sum;
  logic [27:0] norm;
  logic        sticky;
  logic [4:0]  lz;
  logic [9:0]  ey;
  logic        a_inf, b_inf, a_nan, b_nan;

  always_comb begin
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23]; eb = b[30:23];
    a_inf = (ea == 8'hff) && (a[22:0] == '0);
    b_inf = (eb == 8'hff) && (b[22:0] == '0);
    a_nan = (ea == 8'hff) && (a[22:0] != '0);
    b_nan = (eb == 8'hff) && (b[22:0] != '0);

    // larger magnitude first; denormals count as zero
    swap = {eb, (eb == 8'd0) ? 23'd0 : b[22:0]} > {ea, (ea == 8'd0) ? 23'd0 : a[22:0]};
    sx = swap ? sb : sa;
    ex = swap ? eb : ea;
    ez = swap ? ea : eb;
    mx = (ex == 8'd0) ? 27'd0 : {1'b1, (swap ? b[22:0] : a[22:0]), 3'b000};
    mz = (ez == 8'd0) ? 27'd0 : {1'b1, (swap ? a[22:0] : b[22:0]), 3'b000};
    d  = ex - ez;
    eff_sub = sa ^ sb;

    if (d >= 8'd27) begin
      mz_sh  = 27'd0;
      sticky = (mz != 27'd0);
    end else begin
      mz_sh  = mz >> d;
      sticky = ((mz_sh << d) != mz);
    end
    mz_sh[0] = mz_sh[0] | sticky;

    sum = eff_sub ? ({1'b0, mx} - {1'b0, mz_sh}) : ({1'b0, mx} + {1'b0, mz_sh});

    lz = 5'd0;
    for (int i = 26; i >= 0; i--) begin
      if (sum[i]) begin
        lz = 5'(26 - i);
        break;
      end
    end

    if (sum[27]) begin
      norm = {1'b0, sum[27:2], sum[1] | sum[0]};
      ey   = 10'(ex) + 10'd1;
    end else begin
      norm = sum << lz;
      ey   = 10'(ex) - 10'(lz);
    end

    sy = sx;
    if (a_nan || b_nan || (a_inf && b_inf && eff_sub))
      y = 32'h7fc0_0000;
    else if (a_inf)
      y = {sa, 8'hff, 23'd0};
    else if (b_inf)
      y = {sb, 8'hff, 23'd0};
    else if (sum == 28'd0)
      y = 32'd0;
    else if (ey[9] || ey == 10'd0)
      y = {sy, 31'd0};
    else if (ey >= 10'd255)
      y = {sy, 8'hff, 23'd0};
    else
      y = {sy, ey[7:0], norm[25:3]};
  end
endmodule
