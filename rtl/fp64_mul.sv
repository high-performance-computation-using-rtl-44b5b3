// fp64_mul: combinational IEEE-754 double-precision multiplier.
// The 53x53-bit significand product (106 bits) is normalised by at most one
// position and rounded to nearest even using the guard bit and the OR of the
// remaining bits. Subnormal inputs are read as zero and results below the
// normal range are flushed to zero; overflow gives infinity; NaN inputs and
// inf * 0 give the canonical quiet NaN. The document asks only for a 64-bit
// double-precision MUL; rounding and flush-to-zero are this design's choices.
// Interface: a, b in; y out; purely combinational (the FU registers it).
module fp64_mul
  import lsrdp_pkg::*;
(
  input  fp64_t a,
  input  fp64_t b,
  output fp64_t y
);

  logic         s;
  logic [10:0]  ea, eb;
  logic         a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
  logic [105:0] p;
  logic [13:0]  e_res;
  logic [52:0]  m;
  logic         g, st, round_up;
  logic [53:0]  rmant;

  always_comb begin
    s  = a[63] ^ b[63];
    ea = a[62:52];
    eb = b[62:52];
    a_nan  = (ea == 11'h7FF) && (a[51:0] != '0);
    b_nan  = (eb == 11'h7FF) && (b[51:0] != '0);
    a_inf  = (ea == 11'h7FF) && (a[51:0] == '0);
    b_inf  = (eb == 11'h7FF) && (b[51:0] == '0);
    a_zero = (ea == '0);
    b_zero = (eb == '0);

    p     = {53'd0, 1'b1, a[51:0]} * {53'd0, 1'b1, b[51:0]};
    e_res = 14'(ea) + 14'(eb) - 14'd1023;
    if (p[105]) begin
      m     = p[105:53];
      g     = p[52];
      st    = |p[51:0];
      e_res = e_res + 14'd1;
    end else begin
      m  = p[104:52];
      g  = p[51];
      st = |p[50:0];
    end
    round_up = g & (st | m[0]);
    rmant    = {1'b0, m} + 54'(round_up);
    if (rmant[53]) begin
      rmant = rmant >> 1;
      e_res = e_res + 14'd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      y = FP64_QNAN;
    end else if (a_inf || b_inf) begin
      y = {s, 11'h7FF, 52'd0};
    end else if (a_zero || b_zero) begin
      y = {s, 63'd0};
    end else if ($signed(e_res) >= 14'sd2047) begin
      y = {s, 11'h7FF, 52'd0};
    end else if ($signed(e_res) <= 14'sd0) begin
      y = {s, 63'd0};
    end else begin
      y = {s, e_res[10:0], rmant[51:0]};
    end
  end

endmodule
