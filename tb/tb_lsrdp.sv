// tb_lsrdp: checks the PE array end to end at the array level.
// Instance 1 (6 rows x 5 columns, select-based ORNs) is configured over its
// serial chains with a mapping of the explicit 1-D heat update
//   u'[j] = u[j] + r * ((u[j-1] + u[j+1]) - u[j] - u[j])
// (row 0 passes u, row 1 adds the two neighbours and carries u on the TU,
// rows 2-3 subtract u twice, row 4 multiplies by the immediate r, row 5 adds
// u back; columns outside the array read +0.0). Random vectors enter one per
// clock; each result must leave exactly ROWS clocks later with out_valid and
// match the same operations done in the simulator's double arithmetic.
// While the heat vectors stream, a second configuration (row 0: A - B, the
// other rows pass it on) is shifted in; results stay those of the heat
// mapping until commit and follow the new configuration afterwards.
// Instance 2 (2 rows x 4 columns, crossbar ORNs) adds the two neighbours
// through the crossbar network and routes u on the TU by a select.
module tb_lsrdp;
  import lsrdp_pkg::*;
  localparam int unsigned ROWS = 6, COLS = 5, MCL = 1;
  localparam int unsigned SELW = orn_sel_w(MCL);
  localparam int unsigned IMM_LEN = 64 * COLS, PE_LEN = PE_CFG_W * COLS;
  localparam int unsigned ORN_LEN = 3 * SELW * COLS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  // ---------------- instance 1 ----------------
  logic            imm_shift = 0, pe_shift = 0, orn_shift = 0, commit = 0;
  logic [ROWS-1:0] imm_si = '0, pe_si = '0, orn_si = '0;
  logic [ROWS-1:0] imm_so, pe_so, orn_so;
  logic            in_valid = 0, out_valid;
  fp64_t           in_data  [2*COLS];
  fp64_t           out_data [2*COLS];

  lsrdp #(.ROWS(ROWS), .COLS(COLS), .MCL(MCL)) dut (
    .clk, .rst_n, .imm_shift, .pe_shift, .orn_shift, .imm_si, .pe_si, .orn_si,
    .imm_so, .pe_so, .orn_so, .commit, .in_valid, .in_data, .out_valid, .out_data);

  // program
  fu_op_e op   [ROWS][COLS];
  logic   isel [ROWS][COLS];
  fp64_t  imm  [ROWS][COLS];
  int     sel  [ROWS][COLS][3];

  localparam int FU_L = 0, TU_L = 1, FU_0 = 2, TU_0 = 3, FU_R = 4, TU_R = 5;

  task automatic set_row(int r, fu_op_e o, logic is, fp64_t im, int sa, int sb, int sc);
    for (int j = 0; j < int'(COLS); j++) begin
      op[r][j] = o; isel[r][j] = is; imm[r][j] = im;
      sel[r][j][0] = sa; sel[r][j][1] = sb; sel[r][j][2] = sc;
    end
  endtask

  // shift the program in (chain vectors with column 0 in the MSBs, LSB first)
  task automatic shift_program();
    logic [IMM_LEN-1:0] iv [ROWS];
    logic [PE_LEN-1:0]  pv [ROWS];
    logic [ORN_LEN-1:0] ov [ROWS];
    pe_cfg_t w;
    for (int r = 0; r < int'(ROWS); r++)
      for (int j = 0; j < int'(COLS); j++) begin
        iv[r][(COLS-1-j)*64 +: 64] = imm[r][j];
        w.imm_sel = isel[r][j]; w.op = op[r][j];
        pv[r][(COLS-1-j)*PE_CFG_W +: PE_CFG_W] = w;
        for (int k = 0; k < 3; k++)
          ov[r][(COLS-1-j)*3*SELW + k*SELW +: SELW] = SELW'(sel[r][j][k]);
      end
    for (int t = 0; t < int'(IMM_LEN); t++) begin
      @(negedge clk);
      imm_shift = 1; pe_shift = (t < int'(PE_LEN)); orn_shift = (t < int'(ORN_LEN));
      for (int r = 0; r < int'(ROWS); r++) begin
        imm_si[r] = iv[r][t];
        pe_si[r]  = (t < int'(PE_LEN))  ? pv[r][t] : 1'b0;
        orn_si[r] = (t < int'(ORN_LEN)) ? ov[r][t] : 1'b0;
      end
    end
    @(negedge clk);
    imm_shift = 0; pe_shift = 0; orn_shift = 0;
  endtask

  task automatic do_commit();
    @(negedge clk); commit = 1;
    @(negedge clk); commit = 0;
  endtask

  function automatic fp64_t rnd_fp();
    fp64_t v;
    v[63]    = 1'($urandom);
    v[62:52] = 11'(1023 - 20 + ($urandom % 40));
    v[51:0]  = {20'($urandom), $urandom};
    return v;
  endfunction

  // expected outputs, with the cycle each must appear in
  localparam int unsigned QD = 1024;
  fp64_t exp_v [QD][2*COLS];
  int    exp_t [QD];
  int    wr_i = 0, rd_i = 0;
  int    n_out = 0, n_heat = 0, n_sub = 0;

  function automatic real rv(fp64_t x); return $bitstoreal(x); endfunction

  // mode 0: heat mapping with immediate rr; mode 1: row 0 A - B, passed on
  task automatic send(int mode, real rr);
    fp64_t e [2*COLS];
    fp64_t u [COLS];
    @(negedge clk);
    for (int k = 0; k < int'(2*COLS); k++) in_data[k] = rnd_fp();
    in_valid = 1;
    for (int j = 0; j < int'(COLS); j++) u[j] = in_data[2*j];
    for (int j = 0; j < int'(COLS); j++) begin
      if (mode == 0) begin
        real ul, ur, s1, t1, t2, m;
        ul = (j > 0) ? rv(u[j-1]) : 0.0;
        ur = (j < int'(COLS) - 1) ? rv(u[j+1]) : 0.0;
        s1 = ul + ur; t1 = s1 - rv(u[j]); t2 = t1 - rv(u[j]); m = rr * t2;
        e[2*j]   = $realtobits(rv(u[j]) + m);
        e[2*j+1] = u[j];
      end else begin
        e[2*j]   = $realtobits(rv(in_data[2*j]) - rv(in_data[2*j+1]));
        e[2*j+1] = in_data[2*j+1];
      end
    end
    exp_v[wr_i % QD] = e;
    exp_t[wr_i % QD] = cycle + int'(ROWS);
    wr_i++;
    if (mode == 0) n_heat++; else n_sub++;
  endtask

  task automatic idle(int n);
    repeat (n) begin @(negedge clk); in_valid = 0; end
  endtask

  // output checker
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      fp64_t e [2*COLS];
      int    t;
      checks++;
      if (rd_i == wr_i) begin
        failures++; $display("FAIL unexpected out_valid");
      end else begin
        e = exp_v[rd_i % QD];
        t = exp_t[rd_i % QD];
        rd_i++;
        if (t != cycle) begin failures++; $display("FAIL latency: at %0d, expected %0d", cycle, t); end
        for (int k = 0; k < int'(2*COLS); k++) begin
          checks++;
          if (out_data[k] !== e[k]) begin
            failures++;
            if (failures < 10) $display("FAIL out[%0d] got %h exp %h", k, out_data[k], e[k]);
          end
        end
        n_out++;
      end
    end
  end

  // ---------------- instance 2: crossbar ORN ----------------
  localparam int unsigned XR = 2, XC = 4, XK = 2, XNCB = XC + XK;
  localparam int unsigned X_ORN_LEN = orn_chain_len(XC, 1, 1'b1);
  logic          x_imm_shift = 0, x_pe_shift = 0, x_orn_shift = 0, x_commit = 0;
  logic [XR-1:0] x_imm_si = '0, x_pe_si = '0, x_orn_si = '0;
  logic [XR-1:0] x_imm_so, x_pe_so, x_orn_so;
  logic          x_in_valid = 0, x_out_valid;
  fp64_t         x_in  [2*XC];
  fp64_t         x_out [2*XC];

  lsrdp #(.ROWS(XR), .COLS(XC), .MCL(1), .XBAR_ORN(1'b1)) dut_x (
    .clk, .rst_n, .imm_shift(x_imm_shift), .pe_shift(x_pe_shift), .orn_shift(x_orn_shift),
    .imm_si(x_imm_si), .pe_si(x_pe_si), .orn_si(x_orn_si),
    .imm_so(x_imm_so), .pe_so(x_pe_so), .orn_so(x_orn_so), .commit(x_commit),
    .in_valid(x_in_valid), .in_data(x_in), .out_valid(x_out_valid), .out_data(x_out));

  task automatic xbar_test();
    logic [PE_CFG_W*XC-1:0] pv [XR];
    logic [X_ORN_LEN-1:0]   ov;
    logic [2*XC+2*XK*XNCB-1:0] xc;
    pe_cfg_t w;
    fp64_t u [XC];
    // row 0 pass, row 1 add
    for (int j = 0; j < int'(XC); j++) begin
      w.imm_sel = 0; w.op = FU_PASS; pv[0][(XC-1-j)*PE_CFG_W +: PE_CFG_W] = w;
      w.op = FU_ADD;                 pv[1][(XC-1-j)*PE_CFG_W +: PE_CFG_W] = w;
    end
    // crossbar: 1/2 CBs multicast, stage 1 cross, stage 2 bar
    xc = '0;
    for (int j = 0; j < int'(XC); j++) xc[2*j +: 2] = 2'd3;
    for (int i = 0; i < int'(XNCB); i++) begin
      xc[2*XC + 2*(0*XNCB + i) +: 2] = 2'd1;
      xc[2*XC + 2*(1*XNCB + i) +: 2] = 2'd0;
    end
    // chain: {sel_c of column 0 .. column XC-1, crossbar word}
    for (int j = 0; j < int'(XC); j++) ov[X_ORN_LEN - (j+1)*SELW +: SELW] = SELW'(FU_0);
    ov[$bits(xc)-1:0] = xc;
    for (int t = 0; t < int'(X_ORN_LEN); t++) begin
      @(negedge clk);
      x_orn_shift = 1; x_orn_si[1] = ov[t];
      x_pe_shift = (t < int'(PE_CFG_W*XC));
      for (int r = 0; r < int'(XR); r++) x_pe_si[r] = x_pe_shift ? pv[r][t] : 1'b0;
    end
    @(negedge clk); x_orn_shift = 0; x_pe_shift = 0; x_commit = 1;
    @(negedge clk); x_commit = 0;
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      for (int k = 0; k < int'(2*XC); k++) x_in[k] = rnd_fp();
      for (int j = 0; j < int'(XC); j++) u[j] = x_in[2*j];
      x_in_valid = 1;
      @(negedge clk); x_in_valid = 0;
      @(posedge clk); #1;
      checks++;
      if (!x_out_valid) begin failures++; $display("FAIL xbar out_valid"); end
      for (int j = 0; j < int'(XC); j++) begin
        real ul, ur;
        ul = (j > 0) ? rv(u[j-1]) : 0.0;
        ur = (j < int'(XC) - 1) ? rv(u[j+1]) : 0.0;
        checks += 2;
        if (x_out[2*j] !== $realtobits(ul + ur)) begin failures++; $display("FAIL xbar fu[%0d]", j); end
        if (x_out[2*j+1] !== u[j]) begin failures++; $display("FAIL xbar tu[%0d]", j); end
      end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rr;
    for (int k = 0; k < int'(2*COLS); k++) in_data[k] = '0;
    for (int k = 0; k < int'(2*XC); k++) x_in[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    rr = 0.25;
    // heat mapping
    set_row(0, FU_PASS, 0, '0, FU_0, FU_0, FU_0);
    set_row(1, FU_ADD,  0, '0, FU_L, FU_R, FU_0);
    set_row(2, FU_SUB,  0, '0, FU_0, TU_0, TU_0);
    set_row(3, FU_SUB,  0, '0, FU_0, TU_0, TU_0);
    set_row(4, FU_MUL,  1, $realtobits(rr), FU_0, FU_0, TU_0);
    set_row(5, FU_ADD,  0, '0, FU_0, TU_0, TU_0);
    shift_program();
    do_commit();
    for (int n = 0; n < 30; n++) send(0, rr);     // back to back
    for (int n = 0; n < 10; n++) begin send(0, rr); idle(n % 3); end
    // second program shifted in while the heat mapping keeps running
    set_row(0, FU_SUB,  0, '0, FU_0, FU_0, FU_0);
    for (int r = 1; r < int'(ROWS); r++) set_row(r, FU_PASS, 0, '0, FU_0, FU_0, TU_0);
    fork
      shift_program();
      begin
        for (int n = 0; n < int'(IMM_LEN) - 10; n++) send(0, rr);
        idle(1);
      end
    join
    idle(ROWS + 2);
    do_commit();
    for (int n = 0; n < 30; n++) send(1, 0.0);
    idle(ROWS + 4);
    checks++;
    if (rd_i != wr_i) begin failures++; $display("FAIL %0d results missing", wr_i - rd_i); end
    xbar_test();
    $display("heat vectors %0d, second-program vectors %0d, results %0d", n_heat, n_sub, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
