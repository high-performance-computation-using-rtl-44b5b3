// tb_lsrdp_system: end-to-end run of the accelerator at its default size
// (8 x 32 PEs, 64 SPM banks of 1024 words) on the 1-D heat equation,
//   u'[j] = u[j] + r * ((u[j-1] + u[j+1]) - u[j] - u[j]),  u = 0 outside,
// with a behavioural main memory of 7500-clock latency.
//  1. DMA loads NV vectors of 64 words (u[j] in word 2j) into SPM rows 0...
//  2. An execution asking for a new configuration is issued before the
//     bitstream (heat mapping, r = r1) has arrived: it stalls, then commits
//     the configuration in one clock and streams NV rows to SPM rows 256...
//  3. While a second time step runs on those results with the same
//     configuration (data reuse: no main-memory traffic, no reconfiguration),
//     the bitstream for r = r2 is shifted in (pre-configuration).
//  4. A third step commits the waiting r2 configuration without stalling.
//  5. DMA stores the results; they are compared with the same three steps
//     computed in the simulator's double arithmetic. Execution throughput
//     must be one 64-word vector per clock: a step of NV vectors takes
//     NV + ROWS + 2 clocks from command to done (SPM read, array, SPM write,
//     done flag), plus one clock when it commits a new configuration.
// Every mechanism used is counted and must occur at least once.
module tb_lsrdp_system;
  import lsrdp_pkg::*;
  localparam int unsigned ROWS = 8, COLS = 32, NB = 2 * COLS, DEPTH = 1024;
  localparam int unsigned SELW = orn_sel_w(1);
  localparam int unsigned IMM_LEN = 64 * COLS, PE_LEN = PE_CFG_W * COLS;
  localparam int unsigned ORN_LEN = 3 * SELW * COLS;
  localparam int unsigned NV = 120;                 // vectors per step
  localparam int unsigned MEMW = 2 * NV * NB + 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle++;
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_dma_load = 0, n_dma_store = 0, n_cfg_stall = 0, n_commit = 0, n_reuse = 0;
  int n_preconfig = 0, n_mem_stall = 0;
  always @(posedge clk) begin
    if (dut.u_ctrl.commit) n_commit++;
    if (cfg_loading && exec_busy && !dut.u_ctrl.commit &&
        dut.u_ctrl.ex_state == dut.u_ctrl.EX_STREAM) n_preconfig++;
    if (mem_req && !mem_gnt) n_mem_stall++;
  end

  // ---- heat-mapping bitstream ----
  localparam int FU_L = 0, FU_0 = 2, TU_0 = 3, FU_R = 4;

  function automatic logic [PE_CFG_W-1:0] pew(fu_op_e o, logic is);
    pe_cfg_t w;
    w.imm_sel = is; w.op = o;
    return w;
  endfunction

  task automatic stream_heat_config(real rr);
    logic [IMM_LEN-1:0] iv [ROWS];
    logic [PE_LEN-1:0]  pv [ROWS];
    logic [ORN_LEN-1:0] ov [ROWS];
    logic [PE_CFG_W-1:0] w;
    int sa, sb, sc;
    for (int r = 0; r < int'(ROWS); r++) begin
      case (r)
        0: begin w = pew(FU_PASS, 0); sa = FU_0; sb = FU_0; sc = FU_0; end
        1: begin w = pew(FU_ADD, 0);  sa = FU_L; sb = FU_R; sc = FU_0; end
        2, 3: begin w = pew(FU_SUB, 0); sa = FU_0; sb = TU_0; sc = TU_0; end
        4: begin w = pew(FU_MUL, 1);  sa = FU_0; sb = FU_0; sc = TU_0; end
        5: begin w = pew(FU_ADD, 0);  sa = FU_0; sb = TU_0; sc = TU_0; end
        default: begin w = pew(FU_PASS, 0); sa = FU_0; sb = FU_0; sc = TU_0; end
      endcase
      for (int j = 0; j < int'(COLS); j++) begin
        iv[r][(COLS-1-j)*64 +: 64] = (r == 4) ? $realtobits(rr) : 64'h0;
        pv[r][(COLS-1-j)*PE_CFG_W +: PE_CFG_W] = w;
        ov[r][(COLS-1-j)*3*SELW +: 3*SELW] = {SELW'(sc), SELW'(sb), SELW'(sa)};
      end
    end
    @(negedge clk); cfg_start = 1;
    @(negedge clk); cfg_start = 0;
    for (int t = 0; t < int'(IMM_LEN); ) begin
      @(negedge clk);
      cfg_valid = ($urandom % 8) != 0;          // the host sometimes pauses
      for (int r = 0; r < int'(ROWS); r++) begin
        cfg_imm[r] = iv[r][t];
        cfg_pe[r]  = (t < int'(PE_LEN))  ? pv[r][t] : 1'b0;
        cfg_orn[r] = (t < int'(ORN_LEN)) ? ov[r][t] : 1'b0;
      end
      if (cfg_valid) t++;
    end
    @(negedge clk); cfg_valid = 0;
  endtask

  task automatic dma(logic dir, int mm, int sa, int n);
    @(negedge clk);
    dma_start = 1; dma_dir = dir; dma_mm_addr = 32'(mm); dma_spm_addr = 16'(sa); dma_len = 16'(n);
    @(negedge clk); dma_start = 0;
    wait (dma_done);
    @(negedge clk);
    if (dir) n_dma_store++; else n_dma_load++;
  endtask

  int exec_cycles;
  task automatic exec(logic reconf, int src, int dst, int n);
    int t0, stall0;
    @(negedge clk);
    exec_start = 1; exec_reconf = reconf; exec_src = 10'(src); exec_dst = 10'(dst);
    exec_nvec = 16'(n);
    stall0 = int'(stall_cycles);
    t0 = cycle;
    @(negedge clk); exec_start = 0;
    wait (exec_done);
    exec_cycles = cycle - t0 - (int'(stall_cycles) - stall0);
    if (int'(stall_cycles) > stall0) n_cfg_stall++;
    if (!reconf) n_reuse++;
    @(negedge clk);
  endtask

  function automatic real rv(fp64_t x); return $bitstoreal(x); endfunction

  // reference model
  real u_ref [NV][COLS];
  real u_prev [NV][COLS];
  task automatic ref_step(real rr);
    real nu [COLS];
    for (int v = 0; v < int'(NV); v++) begin
      for (int j = 0; j < int'(COLS); j++) begin
        real ul, ur;
        ul = (j > 0) ? u_ref[v][j-1] : 0.0;
        ur = (j < int'(COLS) - 1) ? u_ref[v][j+1] : 0.0;
        nu[j] = u_ref[v][j] + rr * (((ul + ur) - u_ref[v][j]) - u_ref[v][j]);
      end
      for (int j = 0; j < int'(COLS); j++) begin
        u_prev[v][j] = u_ref[v][j];
        u_ref[v][j]  = nu[j];
      end
    end
  endtask

  initial begin
    real r1, r2;
    int stall_before;
    r1 = 0.25; r2 = 0.125;
    // initial temperatures in main memory, word 2j of each vector
    for (int v = 0; v < int'(NV); v++)
      for (int k = 0; k < int'(NB); k++) begin
        real x;
        x = real'($urandom % 100000) / 1000.0 + 1.0;
        u_mem.mem[v*NB + k] = $realtobits(x);
        if (k % 2 == 0) u_ref[v][k/2] = x;
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    checks++;
    if (dut.ROWS != ROWS || dut.COLS != COLS || dut.SPM_DEPTH != DEPTH) begin
      failures++; $display("FAIL testbench sizes differ from the design defaults");
    end

    // 1. load the input vectors
    dma(1'b0, 0, 0, NV * NB);
    // 2. execution waits for its configuration
    fork
      exec(1'b1, 0, 256, NV);
      begin repeat (20) @(negedge clk); stream_heat_config(r1); end
    join
    ref_step(r1);
    checks++;
    // one clock to commit the configuration, then one vector per clock
    if (exec_cycles != int'(NV + ROWS + 3)) begin
      failures++; $display("FAIL step 1 took %0d clocks, expected %0d", exec_cycles, NV + ROWS + 3);
    end
    // 3. second step on SPM-resident results, new bitstream shifted meanwhile
    fork
      exec(1'b0, 256, 512, NV);
      stream_heat_config(r2);
    join
    ref_step(r1);
    checks++;
    if (exec_cycles != int'(NV + ROWS + 2)) begin
      failures++; $display("FAIL step 2 took %0d clocks, expected %0d", exec_cycles, NV + ROWS + 2);
    end
    // 4. third step with the pre-loaded configuration
    wait (cfg_ready);
    stall_before = int'(stall_cycles);
    exec(1'b1, 512, 768, NV);
    checks++;
    if (int'(stall_cycles) != stall_before) begin failures++; $display("FAIL pre-configured step stalled"); end
    ref_step(r2);
    checks++;
    if (exec_cycles != int'(NV + ROWS + 3)) begin
      failures++; $display("FAIL step 3 took %0d clocks", exec_cycles);
    end
    // 5. store and compare
    dma(1'b1, NV * NB, 768 * NB, NV * NB);
    for (int v = 0; v < int'(NV); v++)
      for (int j = 0; j < int'(COLS); j++) begin
        fp64_t got_u, got_p;
        got_u = u_mem.mem[NV*NB + v*NB + 2*j];
        got_p = u_mem.mem[NV*NB + v*NB + 2*j + 1];
        checks += 2;
        if (got_u !== $realtobits(u_ref[v][j])) begin
          failures++;
          if (failures < 10) $display("FAIL u[%0d][%0d] got %h exp %h", v, j, got_u, $realtobits(u_ref[v][j]));
        end
        if (got_p !== $realtobits(u_prev[v][j])) begin
          failures++;
          if (failures < 10) $display("FAIL carried u[%0d][%0d]", v, j);
        end
      end
    $display("mechanisms: dma loads %0d, dma stores %0d, configuration stalls %0d, commits %0d,",
             n_dma_load, n_dma_store, n_cfg_stall, n_commit);
    $display("            reuse runs %0d, pre-configuration clocks %0d, memory grant stalls %0d",
             n_reuse, n_preconfig, n_mem_stall);
    if (n_dma_load == 0)  begin failures++; $display("FAIL no DMA load"); end
    if (n_dma_store == 0) begin failures++; $display("FAIL no DMA store"); end
    if (n_cfg_stall == 0) begin failures++; $display("FAIL no configuration stall"); end
    if (n_commit != 2)    begin failures++; $display("FAIL commits %0d", n_commit); end
    if (n_reuse == 0)     begin failures++; $display("FAIL no configuration reuse"); end
    if (n_preconfig == 0) begin failures++; $display("FAIL no pre-configuration overlap"); end
    if (n_mem_stall == 0) begin failures++; $display("FAIL no memory back-pressure"); end
    checks += 7;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
