// fp64_add: combinational IEEE-754 double-precision adder/subtractor.
// Computes a + b (sub = 0) or a - b (sub = 1) with round-to-nearest-even.
// Operands are aligned with three extra bits (guard, round, sticky), added or
// subtracted as magnitudes, normalised with a leading-zero count and rounded.
// Subnormal inputs are read as zero and results below the normal range are
// flushed to zero; overflow gives infinity; any NaN, or inf - inf, gives the
// canonical quiet NaN. The document only asks for 64-bit double-precision
// ADD/SUB; the rounding mode and the flush-to-zero rule are this design's.
// Interface: a, b, sub in; y out; purely combinational (the FU registers it).
module fp64_add
  import lsrdp_pkg::*;
(
  input  fp64_t a,
  input  fp64_t b,
  input  logic  sub,
  output fp64_t y
);

  logic        sa, sb, sl, ss;
  logic [10:0] ea, eb, el, es;
  logic [52:0] ma, mb, ml, ms;
  logic        a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
  logic        swap, eff_sub;
  logic [11:0] d;
  logic [56:0] big, small_sh, sum;
  logic [5:0]  lz;
  logic [13:0] e_res;
  logic [55:0] norm;
  logic [53:0] rmant;
  logic        round_up, sticky;

  always_comb begin
    sa = a[63];
    sb = b[63] ^ sub;
    ea = a[62:52];
    eb = b[62:52];
    a_nan  = (ea == 11'h7FF) && (a[51:0] != '0);
    b_nan  = (eb == 11'h7FF) && (b[51:0] != '0);
    a_inf  = (ea == 11'h7FF) && (a[51:0] == '0);
    b_inf  = (eb == 11'h7FF) && (b[51:0] == '0);
    a_zero = (ea == '0);
    b_zero = (eb == '0);
    ma = a_zero ? '0 : {1'b1, a[51:0]};
    mb = b_zero ? '0 : {1'b1, b[51:0]};

    // larger magnitude first
    swap = {eb, mb} > {ea, ma};
    sl = swap ? sb : sa;
    ss = swap ? sa : sb;
    el = swap ? eb : ea;
    es = swap ? ea : eb;
    ml = swap ? mb : ma;
    ms = swap ? ma : mb;
    eff_sub = sl ^ ss;

    // align the smaller operand, keeping a sticky bit
    d      = {1'b0, el} - {1'b0, es};
    big    = {1'b0, ml, 3'b000};
    sticky = 1'b0;
    if (d > 12'd55) begin
      small_sh = {56'd0, |ms};
    end else begin
      small_sh = {1'b0, ms, 3'b000} >> d;
      sticky   = ((({1'b0, ms, 3'b000}) & ((57'd1 << d) - 57'd1)) != '0);
      small_sh[0] = small_sh[0] | sticky;
    end

    sum = eff_sub ? (big - small_sh) : (big + small_sh);

    // leading zero count over sum[56:0]
    lz = 6'd57;
    for (int i = 0; i <= 56; i++) begin
      if (sum[i]) lz = 6'(56 - i);
    end

    // normalise so that the hidden bit is at position 55
    norm  = '0;
    e_res = '0;
    if (sum[56]) begin
      norm  = sum[56:1];
      norm[0] = sum[1] | sum[0];
      e_res = {3'b000, el} + 14'd1;
    end else if (lz < 6'd57) begin
      norm  = 56'(sum << (lz - 6'd1));
      e_res = {3'b000, el} - 14'(lz) + 14'd1;
    end

    // round to nearest even: lsb = norm[3], guard = norm[2], rest = norm[1:0]
    round_up = norm[2] & (norm[3] | norm[1] | norm[0]);
    rmant    = {1'b0, norm[55:3]} + 54'(round_up);
    if (rmant[53]) begin
      rmant = rmant >> 1;
      e_res = e_res + 14'd1;
    end

    // result selection
    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb))) begin
      y = FP64_QNAN;
    end else if (a_inf) begin
      y = {sa, 11'h7FF, 52'd0};
    end else if (b_inf) begin
      y = {sb, 11'h7FF, 52'd0};
    end else if (a_zero && b_zero) begin
      y = {sa & sb, 63'd0};
    end else if (lz == 6'd57) begin
      y = 64'd0;                                   // exact cancellation: +0
    end else if ($signed(e_res) >= 14'sd2047) begin
      y = {sl, 11'h7FF, 52'd0};                    // overflow
    end else if ($signed(e_res) <= 14'sd0) begin
      y = {sl, 63'd0};                             // underflow: flush to zero
    end else begin
      y = {sl, e_res[10:0], rmant[51:0]};
    end
  end

endmodule
