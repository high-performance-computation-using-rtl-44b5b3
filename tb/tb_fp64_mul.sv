// tb_fp64_mul: self-checking test of the double-precision multiplier.
// Random normal operands, and products that fall exactly halfway between two
// doubles, are compared bit for bit with the simulator's own double multiply
// (round to nearest even); exponents are kept so that no
// product leaves the normal range. Directed cases cover zero, infinity,
// NaN, inf * 0, overflow and underflow (flushed to zero).
module tb_fp64_mul;
  import lsrdp_pkg::*;

  fp64_t a, b, y;
  int    checks = 0, failures = 0;

  fp64_mul dut (.a(a), .b(b), .y(y));

  function automatic fp64_t rnd_fp();
    fp64_t v;
    v[63]    = 1'($urandom);
    v[62:52] = 11'(1023 - 300 + ($urandom % 600));
    v[51:0]  = {20'($urandom), $urandom};
    return v;
  endfunction

  task automatic check(fp64_t ia, fp64_t ib, fp64_t exp_y);
    a = ia; b = ib;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h got %h exp %h", ia, ib, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp64_t ra, rb;
    for (int i = 0; i < 4000; i++) begin
      ra = rnd_fp();
      rb = rnd_fp();
      check(ra, rb, $realtobits($bitstoreal(ra) * $bitstoreal(rb)));
    end
    // x * 1.5 with an odd significand lands exactly halfway between two
    // doubles: ties must round to even
    for (int i = 0; i < 400; i++) begin
      ra = rnd_fp();
      ra[0] = 1'b1;
      rb = $realtobits(1.5);
      check(ra, rb, $realtobits($bitstoreal(ra) * 1.5));
    end
    check(64'h3FF0_0000_0000_0003, $realtobits(1.5), 64'h3FF8_0000_0000_0004);
    check($realtobits(3.0), $realtobits(-0.5), $realtobits(-1.5));
    check(64'h0, $realtobits(7.0), 64'h0);
    check(64'h7FF0_0000_0000_0000, $realtobits(-2.0), 64'hFFF0_0000_0000_0000);
    check(64'h7FF0_0000_0000_0000, 64'h0, FP64_QNAN);
    check(FP64_QNAN, $realtobits(2.0), FP64_QNAN);
    check(64'h7FE0_0000_0000_0000, 64'h7FE0_0000_0000_0000, 64'h7FF0_0000_0000_0000);
    check(64'h0010_0000_0000_0000, 64'h0010_0000_0000_0000, 64'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
