// tb_fp64_add: self-checking test of the double-precision adder/subtractor.
// Random normal operands (exponents kept well inside the normal range, so no
// result is subnormal) are compared bit for bit with the simulator's own
// double arithmetic, which rounds to nearest even. Directed cases cover
// zeros, exact cancellation, infinities, NaN and overflow.
module tb_fp64_add;
  import lsrdp_pkg::*;

  fp64_t a, b, y;
  logic  sub;
  int    checks = 0, failures = 0;

  fp64_add dut (.a(a), .b(b), .sub(sub), .y(y));

  function automatic fp64_t rnd_fp(int unsigned espan);
    fp64_t v;
    v[63]    = 1'($urandom);
    v[62:52] = 11'(1023 - espan / 2 + ($urandom % espan));
    v[51:0]  = {20'($urandom), $urandom};
    return v;
  endfunction

  task automatic check(fp64_t ia, fp64_t ib, logic isub, fp64_t exp_y);
    a = ia; b = ib; sub = isub;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h sub=%0d got %h exp %h", ia, ib, isub, y, exp_y);
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
    real   r;
    for (int i = 0; i < 4000; i++) begin
      // mix close exponents (cancellation) and wide spreads (sticky path)
      ra = rnd_fp((i % 3 == 0) ? 4 : 140);
      rb = rnd_fp((i % 3 == 0) ? 4 : 140);
      if (i % 7 == 0) rb = {~ra[63], ra[62:1], ~ra[0]};  // near cancellation
      r = (i % 2 == 0) ? $bitstoreal(ra) + $bitstoreal(rb)
                       : $bitstoreal(ra) - $bitstoreal(rb);
      check(ra, rb, 1'(i % 2), $realtobits(r));
    end
    // directed cases
    check($realtobits(1.5), $realtobits(1.5), 1'b1, 64'h0);            // x - x = +0
    check(64'h0, 64'h8000_0000_0000_0000, 1'b0, 64'h0);                 // +0 + -0
    check(64'h8000_0000_0000_0000, 64'h0, 1'b1, 64'h8000_0000_0000_0000); // -0 - +0
    check(64'h7FF0_0000_0000_0000, $realtobits(3.0), 1'b0, 64'h7FF0_0000_0000_0000);
    check(64'h7FF0_0000_0000_0000, 64'h7FF0_0000_0000_0000, 1'b1, FP64_QNAN);
    check(64'h7FF8_0000_0000_0001, $realtobits(1.0), 1'b0, FP64_QNAN);
    check(64'h7FEF_FFFF_FFFF_FFFF, 64'h7FEF_FFFF_FFFF_FFFF, 1'b0, 64'h7FF0_0000_0000_0000);
    check($realtobits(2.0), $realtobits(0.5), 1'b0, $realtobits(2.5));
    check($realtobits(1.0), $realtobits(3.0), 1'b1, $realtobits(-2.0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
