// tb_workload_poisson: runs Jacobi sweeps of the 2-D Poisson equation on the
// accelerator at its default size:
//   u'[i][p] = 0.25 * ((((u[i-1][p] + u[i+1][p]) + u[i][p-1]) + u[i][p+1]) - h2f[i][p])
// with u = 0 outside a 16-point-wide grid of GR rows.
// Each grid point uses two array columns, c0 = 2p and c1 = 2p+1, and each SPM
// input vector holds one grid row together with what the array cannot reach
// by itself (the document's data "rearrangement"): bank 4p = u[i][p],
// bank 4p+1 = u[i-1][p], bank 4p+2 = u[i+1][p], bank 4p+3 = h2f[i][p].
// Horizontal neighbours are two columns away while an ORN reaches one, so
// the odd columns relay them through their FU and TU:
//   row 0  c0: FU pass u, TU u_up          c1: FU pass u_dn, TU h2f
//   row 1  c0: FU u_up + u_dn, TU h2f      c1: FU u[p+1] (from 2p+2), TU u[p] (from 2p)
//   row 2  c0: FU + u[p-1] (TU of 2p-1), TU u[p+1] (FU of 2p+1)
//   row 3  c0: FU + u[p+1], TU h2f ...     row 4: FU - h2f   row 5: FU * 0.25
//   rows 6-7: pass.  The result u' leaves in bank 4p.
// The testbench plays the host: it lays out the input vectors in main
// memory, loads them by DMA, runs a sweep, stores the results, rebuilds the
// layout for the next sweep, and compares every point with the same
// operations done in the simulator's double arithmetic.
module tb_workload_poisson;
  import lsrdp_pkg::*;
  localparam int unsigned ROWS = 8, COLS = 32, NB = 2 * COLS, NP = COLS / 2;
  localparam int unsigned SELW = orn_sel_w(1);
  localparam int unsigned IMM_LEN = 64 * COLS, PE_LEN = PE_CFG_W * COLS;
  localparam int unsigned ORN_LEN = 3 * SELW * COLS;
  localparam int unsigned GR = 48;                 // grid rows
  localparam int unsigned SWEEPS = 3;
  localparam int unsigned MEMW = 2 * GR * NB + 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_start = 0, cfg_valid = 0;
  logic [ROWS-1:0] cfg_imm = '0, cfg_pe = '0, cfg_orn = '0;
  logic cfg_ready, cfg_loading;
  logic exec_start = 0, exec_reconf = 0;
  logic [9:0] exec_src = '0, exec_dst = '0;
  logic [15:0] exec_nvec = '0;
  logic exec_busy, exec_done;
  logic [31:0] stall_cycles;
  logic dma_start = 0, dma_dir = 0;
  logic [31:0] dma_mm_addr = '0;
  logic [15:0] dma_spm_addr = '0, dma_len = '0;
  logic dma_busy, dma_done;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr;
  fp64_t mem_wdata, mem_rdata;

  lsrdp_system dut (
    .clk, .rst_n, .cfg_start, .cfg_valid, .cfg_imm, .cfg_pe, .cfg_orn, .cfg_ready,
    .cfg_loading, .exec_start, .exec_reconf, .exec_src, .exec_dst, .exec_nvec,
    .exec_busy, .exec_done, .stall_cycles, .dma_start, .dma_dir, .dma_mm_addr,
    .dma_spm_addr, .dma_len, .dma_busy, .dma_done, .mem_req, .mem_we, .mem_addr,
    .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata);

  main_memory_model #(.WORDS(MEMW), .LATENCY(200), .MAW(32), .STALL_PCT(10)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- program tables and bitstream ----
  fu_op_e op   [ROWS][COLS];
  logic   isel [ROWS][COLS];
  fp64_t  imm  [ROWS][COLS];
  int     sel  [ROWS][COLS][3];
  localparam int FU_L = 0, TU_L = 1, FU_0 = 2, TU_0 = 3, FU_R = 4, TU_R = 5;

  task automatic pset(int r, int c, fu_op_e o, int sa, int sb, int sc);
    op[r][c] = o; isel[r][c] = 1'b0; imm[r][c] = '0;
    sel[r][c][0] = sa; sel[r][c][1] = sb; sel[r][c][2] = sc;
  endtask

  task automatic build_program();
    for (int r = 0; r < int'(ROWS); r++)
      for (int c = 0; c < int'(COLS); c++) pset(r, c, FU_PASS, FU_0, FU_0, TU_0);
    for (int p = 0; p < int'(NP); p++) begin
      int c0 = 2 * p, c1 = 2 * p + 1;
      // row 0 takes its operands from the ports; selects unused
      pset(1, c0, FU_ADD,  TU_0, FU_R, TU_R);   // u_up + u_dn ; TU <- h2f
      pset(1, c1, FU_PASS, FU_R, FU_0, FU_L);   // FU <- u[p+1] ; TU <- u[p]
      pset(2, c0, FU_ADD,  FU_0, TU_L, FU_R);   // + u[p-1] ; TU <- u[p+1]
      pset(2, c1, FU_PASS, TU_L, FU_0, TU_0);   // FU <- h2f (TU of c0)
      pset(3, c0, FU_ADD,  FU_0, TU_0, FU_R);   // + u[p+1] ; TU <- h2f
      pset(4, c0, FU_SUB,  FU_0, TU_0, TU_0);   // - h2f
      pset(5, c0, FU_MUL,  FU_0, FU_0, TU_0);   // * 0.25
      isel[5][c0] = 1'b1; imm[5][c0] = $realtobits(0.25);
    end
  endtask

  task automatic stream_config();
    logic [IMM_LEN-1:0] iv [ROWS];
    logic [PE_LEN-1:0]  pv [ROWS];
    logic [ORN_LEN-1:0] ov [ROWS];
    pe_cfg_t w;
    for (int r = 0; r < int'(ROWS); r++)
      for (int c = 0; c < int'(COLS); c++) begin
        iv[r][(COLS-1-c)*64 +: 64] = imm[r][c];
        w.imm_sel = isel[r][c]; w.op = op[r][c];
        pv[r][(COLS-1-c)*PE_CFG_W +: PE_CFG_W] = w;
        for (int k = 0; k < 3; k++)
          ov[r][(COLS-1-c)*3*SELW + k*SELW +: SELW] = SELW'(sel[r][c][k]);
      end
    @(negedge clk); cfg_start = 1;
    @(negedge clk); cfg_start = 0;
    for (int t = 0; t < int'(IMM_LEN); t++) begin
      @(negedge clk);
      cfg_valid = 1;
      for (int r = 0; r < int'(ROWS); r++) begin
        cfg_imm[r] = iv[r][t];
        cfg_pe[r]  = (t < int'(PE_LEN))  ? pv[r][t] : 1'b0;
        cfg_orn[r] = (t < int'(ORN_LEN)) ? ov[r][t] : 1'b0;
      end
    end
    @(negedge clk); cfg_valid = 0;
  endtask

  task automatic dma(logic dir, int mm, int sa, int n);
    @(negedge clk);
    dma_start = 1; dma_dir = dir; dma_mm_addr = 32'(mm); dma_spm_addr = 16'(sa); dma_len = 16'(n);
    @(negedge clk); dma_start = 0;
    wait (dma_done);
    @(negedge clk);
  endtask

  task automatic exec(logic reconf, int src, int dst, int n);
    @(negedge clk);
    exec_start = 1; exec_reconf = reconf; exec_src = 10'(src); exec_dst = 10'(dst);
    exec_nvec = 16'(n);
    @(negedge clk); exec_start = 0;
    wait (exec_done);
    @(negedge clk);
  endtask

  // ---- grid state ----
  real u   [GR][NP];
  real h2f [GR][NP];
  real nu  [GR][NP];

  function automatic real g(int i, int p);
    if (i < 0 || i >= int'(GR) || p < 0 || p >= int'(NP)) return 0.0;
    return u[i][p];
  endfunction

  // host-side rearrangement: grid -> input vectors at main-memory word 0
  task automatic layout();
    for (int i = 0; i < int'(GR); i++)
      for (int p = 0; p < int'(NP); p++) begin
        u_mem.mem[i*NB + 4*p + 0] = $realtobits(g(i, p));
        u_mem.mem[i*NB + 4*p + 1] = $realtobits(g(i - 1, p));
        u_mem.mem[i*NB + 4*p + 2] = $realtobits(g(i + 1, p));
        u_mem.mem[i*NB + 4*p + 3] = $realtobits(h2f[i][p]);
      end
  endtask

  initial begin
    int n_sweeps = 0;
    for (int i = 0; i < int'(GR); i++)
      for (int p = 0; p < int'(NP); p++) begin
        u[i][p]   = real'($urandom % 10000) / 100.0;
        h2f[i][p] = real'($urandom % 1000) / 1000.0 - 0.5;
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    build_program();
    fork
      stream_config();
      begin layout(); dma(1'b0, 0, 0, GR * NB); end
    join
    for (int s = 0; s < int'(SWEEPS); s++) begin
      if (s > 0) begin
        layout();
        dma(1'b0, 0, 0, GR * NB);
      end
      exec(s == 0, 0, 512, GR);
      dma(1'b1, GR * NB, 512 * NB, GR * NB);
      // reference sweep, same operation order as the mapping
      for (int i = 0; i < int'(GR); i++)
        for (int p = 0; p < int'(NP); p++)
          nu[i][p] = 0.25 * ((((g(i-1, p) + g(i+1, p)) + g(i, p-1)) + g(i, p+1)) - h2f[i][p]);
      for (int i = 0; i < int'(GR); i++)
        for (int p = 0; p < int'(NP); p++) begin
          fp64_t got;
          got = u_mem.mem[GR*NB + i*NB + 4*p];
          checks++;
          if (got !== $realtobits(nu[i][p])) begin
            failures++;
            if (failures < 10) $display("FAIL sweep %0d u[%0d][%0d] got %h exp %h", s, i, p, got, $realtobits(nu[i][p]));
          end
          u[i][p] = $bitstoreal(got);
        end
      n_sweeps++;
    end
    $display("Jacobi sweeps %0d on a %0dx%0d grid", n_sweeps, GR, NP);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
