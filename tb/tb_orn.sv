// tb_orn: checks the select-based operand routing network with 5 columns
// and MCL = 2 (10 sources per input, 4-bit selects, codes 10..15 unused).
// Random select words are shifted in over the chain and committed; then, for
// random FU and TU values of the source row, every A, B and C output is
// compared with the value a reference computes from the select code:
// column j + code/2 - MCL, FU for even codes and TU for odd ones, +0.0 when
// that column is outside the array or the code is unused.
module tb_orn;
  import lsrdp_pkg::*;
  localparam int unsigned COLS = 5;
  localparam int unsigned MCL  = 2;
  localparam int unsigned SELW = orn_sel_w(MCL);
  localparam int unsigned L    = 3 * SELW * COLS;

  logic  clk = 0, rst_n = 0, shift = 0, si = 0, commit = 0, so;
  fp64_t fu_o [COLS];
  fp64_t tu_o [COLS];
  fp64_t a [COLS];
  fp64_t b [COLS];
  fp64_t c [COLS];
  int    checks = 0, failures = 0;

  orn #(.COLS(COLS), .MCL(MCL)) dut (.clk, .rst_n, .shift, .si, .so, .commit,
                                      .fu_o, .tu_o, .a, .b, .c);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp64_t ref_sel(int j, int code);
    int src;
    if (code >= 2 * (2 * MCL + 1)) return '0;
    src = j + code / 2 - int'(MCL);
    if (src < 0 || src >= int'(COLS)) return '0;
    return (code % 2) ? tu_o[src] : fu_o[src];
  endfunction

  initial begin
    int sel [COLS][3];
    logic [L-1:0] chain;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      // mostly valid codes, sometimes unused ones
      for (int j = 0; j < COLS; j++)
        for (int k = 0; k < 3; k++)
          sel[j][k] = (n % 5 == 4) ? int'($urandom % 16) : int'($urandom % (2 * (2 * MCL + 1)));
      // chain vector: column 0 in the MSBs, each column {sel_c, sel_b, sel_a}
      for (int j = 0; j < COLS; j++)
        for (int k = 0; k < 3; k++)
          chain[(COLS - 1 - j) * 3 * SELW + k * SELW +: SELW] = SELW'(sel[j][k]);
      for (int t = 0; t < L; t++) begin
        @(negedge clk);
        shift = 1; si = chain[t];
      end
      @(negedge clk);
      shift = 0; commit = 1;
      @(negedge clk);
      commit = 0;
      for (int v = 0; v < 8; v++) begin
        for (int j = 0; j < COLS; j++) begin
          fu_o[j] = {$urandom, $urandom};
          tu_o[j] = {$urandom, $urandom};
        end
        #1;
        for (int j = 0; j < COLS; j++) begin
          checks += 3;
          if (a[j] !== ref_sel(j, sel[j][0])) begin failures++; $display("FAIL a[%0d] code %0d", j, sel[j][0]); end
          if (b[j] !== ref_sel(j, sel[j][1])) begin failures++; $display("FAIL b[%0d] code %0d", j, sel[j][1]); end
          if (c[j] !== ref_sel(j, sel[j][2])) begin failures++; $display("FAIL c[%0d] code %0d", j, sel[j][2]); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
