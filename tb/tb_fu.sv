// tb_fu: checks the functional unit: for random doubles and each operation
// (ADD, SUB, MUL, PASS) the result appears exactly one clock after the
// operands, equal bit for bit to the simulator's own double arithmetic.
module tb_fu;
  import lsrdp_pkg::*;
  logic   clk = 0, rst_n = 0;
  fu_op_e op;
  fp64_t  a, b, y;
  int     checks = 0, failures = 0;

  fu dut (.clk, .rst_n, .op, .a, .b, .y);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp64_t rnd_fp();
    fp64_t v;
    v[63]    = 1'($urandom);
    v[62:52] = 11'(1023 - 60 + ($urandom % 120));
    v[51:0]  = {20'($urandom), $urandom};
    return v;
  endfunction

  initial begin
    fp64_t exp_q;
    real ra, rb;
    op = FU_ADD; a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      a  = rnd_fp();
      b  = rnd_fp();
      op = fu_op_e'(i % 4);
      ra = $bitstoreal(a);
      rb = $bitstoreal(b);
      case (op)
        FU_ADD:  exp_q = $realtobits(ra + rb);
        FU_SUB:  exp_q = $realtobits(ra - rb);
        FU_MUL:  exp_q = $realtobits(ra * rb);
        default: exp_q = a;
      endcase
      // output must not yet show the new result before the clock edge
      #1;
      if (i > 0) begin
        checks++;
        if (y === exp_q && exp_q !== '0 && a !== b) begin
          // a combinational path would show the new value immediately
          failures++;
          $display("FAIL result visible before the clock edge");
        end
      end
      @(posedge clk); #1;
      checks++;
      if (y !== exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s a=%h b=%h got %h exp %h", op.name(), a, b, y, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
