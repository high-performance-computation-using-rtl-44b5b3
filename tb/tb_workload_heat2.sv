// tb_workload_heat2: runs an expanded heat DFG, two explicit time steps of the
// 1-D heat equation folded into one pass, on the accelerator at its default
// size (8 rows x 32 columns). Each array column is one grid point, each SPM
// vector one independent 32-point rod with u = 0 beyond both ends.
// The update is written as u' = r * ((u[j-1] + k*u[j]) + u[j+1]) with
// k = (1 - 2r) / r, which needs four array rows per time step:
//   row 0: FU u*k (immediate k), TU u          (u sits in banks 2j and 2j+1)
//   row 1: FU TU[j-1] + FU[j], TU <- TU[j+1]
//   row 2: FU FU + TU                          row 3: FU * r (immediate) = u'
//   row 4: FU u'*k, TU <- FU = u'              rows 5-7: as rows 1-3 -> u''
// The result u'' leaves in bank 2j. The host duplicates it into both banks
// for the next pass (the data "rearrangement" between passes).
// The testbench plays the host: it lays out the rods in main memory, loads
// them by DMA, runs PASSES passes, stores the results, and compares every
// point with the same operations done in the simulator's double arithmetic.
// It also checks that a pass of N vectors takes N + ROWS + 2 clocks from
// command to done (one more when it commits a configuration).
module tb_workload_heat2;
  import lsrdp_pkg::*;
  localparam int unsigned ROWS = 8, COLS = 32, NB = 2 * COLS;
  localparam int unsigned SELW = orn_sel_w(1);
  localparam int unsigned IMM_LEN = 64 * COLS, PE_LEN = PE_CFG_W * COLS;
  localparam int unsigned ORN_LEN = 3 * SELW * COLS;
  localparam int unsigned NV = 64;                 // rods (vectors) per pass
  localparam int unsigned PASSES = 3;              // two time steps each
  localparam int unsigned MEMW = 2 * NV * NB + 64;
  localparam real R = 0.3;

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

  main_memory_model #(.WORDS(MEMW), .LATENCY(7500), .MAW(32), .STALL_PCT(10)) u_mem (
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
  real k;

  task automatic pset(int r, int c, fu_op_e o, int sa, int sb, int sc);
    op[r][c] = o; isel[r][c] = 1'b0; imm[r][c] = '0;
    sel[r][c][0] = sa; sel[r][c][1] = sb; sel[r][c][2] = sc;
  endtask

  task automatic pimm(int r, int c, real v);
    isel[r][c] = 1'b1; imm[r][c] = $realtobits(v);
  endtask

  task automatic build_program();
    for (int c = 0; c < int'(COLS); c++) begin
      // row 0 takes its operands from the ports; selects unused
      pset(0, c, FU_MUL,  FU_0, FU_0, TU_0); pimm(0, c, k);   // k*u ; TU <- u
      pset(1, c, FU_ADD,  TU_L, FU_0, TU_R);                  // u[j-1] + k*u ; TU <- u[j+1]
      pset(2, c, FU_ADD,  FU_0, TU_0, TU_0);                  // + u[j+1]
      pset(3, c, FU_MUL,  FU_0, FU_0, TU_0); pimm(3, c, R);   // * r -> u'
      pset(4, c, FU_MUL,  FU_0, FU_0, FU_0); pimm(4, c, k);   // k*u' ; TU <- u'
      pset(5, c, FU_ADD,  TU_L, FU_0, TU_R);
      pset(6, c, FU_ADD,  FU_0, TU_0, TU_0);
      pset(7, c, FU_MUL,  FU_0, FU_0, TU_0); pimm(7, c, R);   // -> u''
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
        for (int q = 0; q < 3; q++)
          ov[r][(COLS-1-c)*3*SELW + q*SELW +: SELW] = SELW'(sel[r][c][q]);
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

  // returns the clocks from the command edge to the edge that raised done
  task automatic exec(logic reconf, int src, int dst, int n, output int cycles);
    @(negedge clk);
    exec_start = 1; exec_reconf = reconf; exec_src = 10'(src); exec_dst = 10'(dst);
    exec_nvec = 16'(n);
    cycles = 0;
    @(negedge clk); exec_start = 0;
    cycles = 1;
    while (!exec_done) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  // ---- rod state ----
  real u  [NV][COLS];
  real nu [NV][COLS];

  function automatic real g(int v, int j);
    if (j < 0 || j >= int'(COLS)) return 0.0;
    return u[v][j];
  endfunction

  // host-side layout: u[j] into banks 2j and 2j+1 of vector v
  task automatic layout();
    for (int v = 0; v < int'(NV); v++)
      for (int j = 0; j < int'(COLS); j++) begin
        u_mem.mem[v*NB + 2*j]     = $realtobits(u[v][j]);
        u_mem.mem[v*NB + 2*j + 1] = $realtobits(u[v][j]);
      end
  endtask

  // one reference time step, same operation order as the mapping
  task automatic ref_step();
    for (int v = 0; v < int'(NV); v++)
      for (int j = 0; j < int'(COLS); j++)
        nu[v][j] = R * ((g(v, j - 1) + k * u[v][j]) + g(v, j + 1));
    u = nu;
  endtask

  initial begin
    int n_pass = 0, cyc = 0;
    real want [NV][COLS];
    k = (1.0 - 2.0 * R) / R;
    for (int v = 0; v < int'(NV); v++)
      for (int j = 0; j < int'(COLS); j++)
        u[v][j] = real'($urandom % 10000) / 100.0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    build_program();
    fork
      stream_config();
      begin layout(); dma(1'b0, 0, 0, NV * NB); end
    join
    for (int s = 0; s < int'(PASSES); s++) begin
      if (s > 0) begin
        layout();
        dma(1'b0, 0, 0, NV * NB);
      end
      exec(s == 0, 0, 512, NV, cyc);
      checks++;
      if (cyc != int'(NV + ROWS + 2) + (s == 0 ? 1 : 0)) begin
        failures++;
        $display("FAIL pass %0d took %0d clocks", s, cyc);
      end
      @(negedge clk);
      dma(1'b1, NV * NB, 512 * NB, NV * NB);
      ref_step();
      ref_step();
      want = u;
      for (int v = 0; v < int'(NV); v++)
        for (int j = 0; j < int'(COLS); j++) begin
          fp64_t got;
          got = u_mem.mem[NV*NB + v*NB + 2*j];
          checks++;
          if (got !== $realtobits(want[v][j])) begin
            failures++;
            if (failures < 10)
              $display("FAIL pass %0d rod %0d point %0d got %h exp %h", s, v, j, got,
                       $realtobits(want[v][j]));
          end
          u[v][j] = $bitstoreal(got);
        end
      n_pass++;
    end
    $display("heat passes %0d (%0d time steps) on %0d rods of %0d points", n_pass,
             2 * n_pass, NV, COLS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
