// tb_pe: checks a processing element. For each of a series of random
// configurations (operation, immediate select, 64-bit immediate) the test
// shifts the immediate and the 3-bit PE word in over their chains, checks
// that the old configuration stays active until commit, and then checks
// FU = A op B (or A op IMM) and TU = C, both one clock after the inputs.
module tb_pe;
  import lsrdp_pkg::*;
  logic  clk = 0, rst_n = 0;
  logic  imm_shift = 0, imm_si = 0, pe_shift = 0, pe_si = 0, commit = 0;
  logic  imm_so, pe_so;
  fp64_t in_a, in_b, in_c, out_fu, out_tu;
  int    checks = 0, failures = 0;

  pe dut (.clk, .rst_n, .imm_shift, .imm_si, .imm_so, .pe_shift, .pe_si, .pe_so,
          .commit, .in_a, .in_b, .in_c, .out_fu, .out_tu);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp64_t rnd_fp();
    fp64_t v;
    v[63]    = 1'($urandom);
    v[62:52] = 11'(1023 - 40 + ($urandom % 80));
    v[51:0]  = {20'($urandom), $urandom};
    return v;
  endfunction

  function automatic fp64_t model(fu_op_e op, fp64_t a, fp64_t b);
    case (op)
      FU_ADD:  return $realtobits($bitstoreal(a) + $bitstoreal(b));
      FU_SUB:  return $realtobits($bitstoreal(a) - $bitstoreal(b));
      FU_MUL:  return $realtobits($bitstoreal(a) * $bitstoreal(b));
      default: return a;
    endcase
  endfunction

  task automatic run_vectors(fu_op_e op, logic isel, fp64_t imm, int n);
    fp64_t e_fu, e_tu;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_a = rnd_fp(); in_b = rnd_fp(); in_c = rnd_fp();
      e_fu = model(op, in_a, isel ? imm : in_b);
      e_tu = in_c;
      @(posedge clk); #1;
      checks += 2;
      if (out_fu !== e_fu) begin
        failures++;
        if (failures < 10) $display("FAIL fu op=%s sel=%0d got %h exp %h", op.name(), isel, out_fu, e_fu);
      end
      if (out_tu !== e_tu) begin
        failures++;
        if (failures < 10) $display("FAIL tu got %h exp %h", out_tu, e_tu);
      end
    end
  endtask

  initial begin
    fu_op_e op, op_old;
    logic   isel, isel_old;
    fp64_t  imm, imm_old;
    pe_cfg_t w;
    in_a = '0; in_b = '0; in_c = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    op_old = FU_ADD; isel_old = 0; imm_old = '0;
    for (int n = 0; n < 24; n++) begin
      op   = fu_op_e'(n % 4);
      isel = 1'((n / 4) % 2);
      imm  = rnd_fp();
      w.imm_sel = isel; w.op = op;
      // shift: 64 immediate bits and, during the first 3 clocks, the PE word
      for (int t = 0; t < 64; t++) begin
        @(negedge clk);
        imm_shift = 1; imm_si = imm[t];
        pe_shift  = (t < PE_CFG_W); pe_si = (t < PE_CFG_W) ? w[t] : 1'b0;
        in_a = rnd_fp(); in_b = rnd_fp(); in_c = rnd_fp();
        if (t % 16 == 0) begin
          // the previous configuration is still the one in use
          fp64_t e;
          e = model(op_old, in_a, isel_old ? imm_old : in_b);
          @(posedge clk); #1;
          checks++;
          if (out_fu !== e) begin failures++; $display("FAIL old config not held"); end
        end
      end
      @(negedge clk);
      imm_shift = 0; pe_shift = 0;
      commit = 1;
      @(negedge clk);
      commit = 0;
      run_vectors(op, isel, imm, 20);
      op_old = op; isel_old = isel; imm_old = imm;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
