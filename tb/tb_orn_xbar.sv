// tb_orn_xbar: checks the crossbar ORN (6 columns; MCL = 1 and MCL = 2).
// Random switch settings are applied and every A and B output is compared
// with a reference that traces the output backwards through the switch
// settings: a CB output comes from in0 or in1 according to its setting, in0
// from the down output of the node above in the previous stage, in1 from the
// up output of the node below, until a 1/2 CB (and its enable bit) or the
// edge of the network is reached. A directed case routes FU j-1 to A and
// FU j+1 to B of every PE (stencil pattern), and reach beyond MCL is
// checked to be impossible.
module tb_orn_xbar;
  import lsrdp_pkg::*;
  localparam int unsigned COLS = 6;

  int checks = 0, failures = 0;

  fp64_t fu_o [COLS];

  // MCL = 1 instance
  localparam int unsigned K1 = 2, N1 = COLS + K1;
  logic [1:0] h1 [COLS];
  logic [1:0] c1 [K1][N1];
  fp64_t a1 [COLS];
  fp64_t b1 [COLS];
  orn_xbar #(.COLS(COLS), .MCL(1)) dut1 (.hcb_cfg(h1), .cb_cfg(c1), .fu_o, .a(a1), .b(b1));

  // MCL = 2 instance
  localparam int unsigned K2 = 4, N2 = COLS + K2;
  logic [1:0] h2 [COLS];
  logic [1:0] c2 [K2][N2];
  fp64_t a2 [COLS];
  fp64_t b2 [COLS];
  orn_xbar #(.COLS(COLS), .MCL(2)) dut2 (.hcb_cfg(h2), .cb_cfg(c2), .fu_o, .a(a2), .b(b2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // setting of the CB at stage s (1..K), position x; or the 1/2 CB at stage 0
  function automatic logic [1:0] setting(int mcl, int s, int x);
    int K = 2 * mcl;
    if (s == 0) return (mcl == 1) ? h1[x / 2] : h2[x / 2];
    return (mcl == 1) ? c1[s-1][(x + s) / 2] : c2[s-1][(x + s) / 2];
  endfunction

  // value leaving node (s, x) on output o (0 = up, 1 = down)
  function automatic fp64_t trace(int mcl, int s, int x, int o);
    int K = 2 * mcl;
    logic [1:0] st;
    int from_in;
    if (x < -s || x > 2 * (int'(COLS) - 1) + s) return '0;
    if (s == 0) begin
      if (x < 0 || x % 2 != 0 || x / 2 >= int'(COLS)) return '0;
      st = setting(mcl, 0, x);
      return st[o] ? fu_o[x / 2] : '0;
    end
    st = setting(mcl, s, x);
    case (st)
      2'd0: from_in = o;
      2'd1: from_in = 1 - o;
      2'd2: from_in = 0;
      default: from_in = 1;
    endcase
    if (from_in == 0) return trace(mcl, s - 1, x - 1, 1);
    else              return trace(mcl, s - 1, x + 1, 0);
  endfunction

  task automatic compare(string tag);
    for (int j = 0; j < int'(COLS); j++) begin
      checks += 4;
      if (a1[j] !== trace(1, K1, 2 * j, 0)) begin failures++; $display("FAIL %s mcl1 a[%0d]", tag, j); end
      if (b1[j] !== trace(1, K1, 2 * j, 1)) begin failures++; $display("FAIL %s mcl1 b[%0d]", tag, j); end
      if (a2[j] !== trace(2, K2, 2 * j, 0)) begin failures++; $display("FAIL %s mcl2 a[%0d]", tag, j); end
      if (b2[j] !== trace(2, K2, 2 * j, 1)) begin failures++; $display("FAIL %s mcl2 b[%0d]", tag, j); end
    end
  endtask

  initial begin
    for (int j = 0; j < int'(COLS); j++) fu_o[j] = 64'h3FF0_0000_0000_0000 + 64'(j + 1);
    // directed stencil routing for MCL = 1: all 1/2 CBs multicast, stage 1
    // cross, stage 2 bar -> A = FU j-1, B = FU j+1
    for (int j = 0; j < int'(COLS); j++) h1[j] = 2'd3;
    for (int i = 0; i < int'(N1); i++) begin c1[0][i] = 2'd1; c1[1][i] = 2'd0; end
    for (int j = 0; j < int'(COLS); j++) h2[j] = 2'd0;
    for (int s = 0; s < int'(K2); s++) for (int i = 0; i < int'(N2); i++) c2[s][i] = 2'd0;
    #1;
    for (int j = 0; j < int'(COLS); j++) begin
      checks += 2;
      if (a1[j] !== ((j > 0) ? fu_o[j-1] : 64'h0)) begin failures++; $display("FAIL stencil a[%0d]", j); end
      if (b1[j] !== ((j < int'(COLS) - 1) ? fu_o[j+1] : 64'h0)) begin failures++; $display("FAIL stencil b[%0d]", j); end
    end
    compare("directed");
    // random settings and data
    for (int n = 0; n < 400; n++) begin
      for (int j = 0; j < int'(COLS); j++) begin
        fu_o[j] = {$urandom, $urandom};
        h1[j] = 2'($urandom);
        h2[j] = 2'($urandom);
      end
      for (int s = 0; s < int'(K1); s++) for (int i = 0; i < int'(N1); i++) c1[s][i] = 2'($urandom);
      for (int s = 0; s < int'(K2); s++) for (int i = 0; i < int'(N2); i++) c2[s][i] = 2'($urandom);
      #1;
      compare("random");
      // reach: with MCL = 1, an output can only carry FU j-1, j or j+1
      for (int j = 0; j < int'(COLS); j++) begin
        checks++;
        if (!(a1[j] == 0 || a1[j] == fu_o[j] || (j > 0 && a1[j] == fu_o[j-1]) ||
              (j < int'(COLS) - 1 && a1[j] == fu_o[j+1]))) begin
          failures++; $display("FAIL reach a[%0d]", j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
