// tb_lsrdp_ctrl: checks the configuration and execution sequencer with a
// 3-row, 2-column array modelled by a ROWS-clock valid delay line.
// Configuration: beats arrive with random gaps; each chain kind must shift
// exactly as many times as it is long (128, 6 and 18 bits), the bits must
// pass straight to the chains, and cfg_ready must rise after the last beat.
// Execution: an exec with reconfiguration issued before the bitstream is
// complete must wait (stall cycles counted), commit for exactly one clock
// once ready, read nvec consecutive SPM rows one per clock, raise the array's
// in_valid one clock after each read, write each result to consecutive
// destination rows, and raise done at the (ROWS+1)-th clock edge after the
// edge that ends the last read (one clock SPM, ROWS array, one write).
// A second exec without reconfiguration must not commit.
module tb_lsrdp_ctrl;
  localparam int unsigned ROWS = 3, COLS = 2, MCL = 1, RAW = 6, NW = 8;
  localparam int unsigned IMM_LEN = 64 * COLS, PE_LEN = 3 * COLS, ORN_LEN = 9 * COLS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_start = 0, cfg_valid = 0;
  logic [ROWS-1:0] cfg_imm = '0, cfg_pe = '0, cfg_orn = '0;
  logic cfg_ready, cfg_loading;
  logic exec_start = 0, exec_reconf = 0;
  logic [RAW-1:0] exec_src = '0, exec_dst = '0;
  logic [NW-1:0] exec_nvec = '0;
  logic exec_busy, exec_done;
  logic [31:0] stall_cycles;
  logic imm_shift, pe_shift, orn_shift, commit;
  logic [ROWS-1:0] imm_si, pe_si, orn_si;
  logic spm_rd_en, lsrdp_in_valid, spm_wr_en;
  logic [RAW-1:0] spm_rd_row, spm_wr_row;
  logic [ROWS-1:0] vdel = '0;
  int checks = 0, failures = 0;

  lsrdp_ctrl #(.ROWS(ROWS), .COLS(COLS), .MCL(MCL), .RAW(RAW), .NW(NW)) dut (
    .clk, .rst_n, .cfg_start, .cfg_valid, .cfg_imm, .cfg_pe, .cfg_orn, .cfg_ready,
    .cfg_loading, .exec_start, .exec_reconf, .exec_src, .exec_dst, .exec_nvec,
    .exec_busy, .exec_done, .stall_cycles, .imm_shift, .pe_shift, .orn_shift,
    .imm_si, .pe_si, .orn_si, .commit, .spm_rd_en, .spm_rd_row, .lsrdp_in_valid,
    .lsrdp_out_valid(vdel[ROWS-1]), .spm_wr_en, .spm_wr_row);

  // array stand-in: valid delayed by ROWS clocks
  always @(posedge clk) vdel <= {vdel[ROWS-2:0], lsrdp_in_valid};

  // monitors
  int n_imm = 0, n_pe = 0, n_orn = 0, n_commit = 0, n_rd = 0, n_wr = 0, n_inv = 0;
  int last_rd_cycle = 0, done_cycle = 0, cycle = 0;
  int rd_expect_row = 0, wr_expect_row = 0;
  logic rd_en_q = 0;
  always @(posedge clk) begin
    cycle++;
    if (imm_shift) n_imm++;
    if (pe_shift)  n_pe++;
    if (orn_shift) n_orn++;
    if (commit)    n_commit++;
    if (lsrdp_in_valid) n_inv++;
    if (imm_shift && (imm_si !== cfg_imm || pe_si !== cfg_pe || orn_si !== cfg_orn)) begin
      failures++; $display("FAIL chain bits not passed through");
    end
    // in_valid must follow the read by exactly one clock
    if (rst_n) begin
      checks++;
      if (lsrdp_in_valid !== rd_en_q) begin failures++; $display("FAIL in_valid timing"); end
    end
    rd_en_q <= spm_rd_en;
    if (spm_rd_en) begin
      checks++;
      if (int'(spm_rd_row) != rd_expect_row) begin failures++; $display("FAIL read row %0d exp %0d", spm_rd_row, rd_expect_row); end
      rd_expect_row++; n_rd++; last_rd_cycle = cycle;
    end
    if (spm_wr_en) begin
      checks++;
      if (int'(spm_wr_row) != wr_expect_row) begin failures++; $display("FAIL write row %0d exp %0d", spm_wr_row, wr_expect_row); end
      wr_expect_row++; n_wr++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  task automatic exec(logic reconf, int src, int dst, int n);
    @(negedge clk);
    exec_start = 1; exec_reconf = reconf; exec_src = RAW'(src); exec_dst = RAW'(dst);
    exec_nvec = NW'(n);
    rd_expect_row = src; wr_expect_row = dst;
    @(negedge clk); exec_start = 0;
  endtask

  initial begin
    int stall0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // start an exec that needs a new configuration before any is loaded
    exec(1'b1, 4, 20, 10);
    @(negedge clk); cfg_start = 1;
    @(negedge clk); cfg_start = 0;
    chk(int'(cfg_loading), 1, "loading");
    for (int b = 0; b < int'(IMM_LEN); ) begin
      @(negedge clk);
      cfg_valid = ($urandom % 4) != 0;
      cfg_imm = ROWS'($urandom); cfg_pe = ROWS'($urandom); cfg_orn = ROWS'($urandom);
      if (cfg_valid) b++;
      chk(int'(commit), 0, "no commit while loading");
    end
    @(negedge clk); cfg_valid = 0;
    // commit happens in the clock the configuration is ready
    wait (exec_done);
    done_cycle = cycle;
    @(negedge clk);
    chk(n_imm, IMM_LEN, "imm shifts");
    chk(n_pe, PE_LEN, "pe shifts");
    chk(n_orn, ORN_LEN, "orn shifts");
    chk(n_commit, 1, "commits");
    chk(n_rd, 10, "rows read");
    chk(n_wr, 10, "rows written");
    chk(done_cycle - last_rd_cycle, ROWS + 1, "done after last read");
    checks++;
    if (stall_cycles < IMM_LEN) begin failures++; $display("FAIL stall count %0d", stall_cycles); end
    $display("configuration wait: %0d stall cycles", stall_cycles);
    chk(int'(cfg_ready), 0, "ready cleared by commit");
    // second exec reuses the configuration: no commit, no stall
    stall0 = int'(stall_cycles);
    exec(1'b0, 30, 40, 7);
    wait (exec_done);
    @(negedge clk);
    chk(n_commit, 1, "no commit on reuse");
    chk(n_rd, 17, "rows read 2");
    chk(n_wr, 17, "rows written 2");
    chk(int'(stall_cycles), stall0, "no stall on reuse");
    chk(int'(exec_busy), 0, "idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
