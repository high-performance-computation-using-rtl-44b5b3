// tb_dma: checks the DMA engine between a behavioural main memory (random
// grant stalls, 20-clock read latency) and a small scratchpad. A block is
// loaded from main memory into the SPM, checked word by word through the SPM
// port, stored back to another main-memory region and checked there. Loads
// must keep several reads in flight: a block of N words has to finish in
// well under N times the memory latency. A zero-length command completes at
// once.
module tb_dma;
  import lsrdp_pkg::*;
  localparam int unsigned NB = 4, D = 64, SAW = $clog2(NB * D), LAT = 20;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, dir = 0, busy, done;
  logic [31:0] mm_addr = '0;
  logic [SAW-1:0] spm_addr = '0;
  logic [15:0] len = '0;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr;
  fp64_t mem_wdata, mem_rdata;
  logic spm_en, spm_we;
  logic [SAW-1:0] spm_waddr;
  fp64_t spm_wdata, spm_rdata;
  fp64_t rd_data [NB];
  fp64_t wr_data [NB];
  int checks = 0, failures = 0;

  dma #(.MAW(32), .SAW(SAW), .LENW(16)) dut (.clk, .rst_n, .start, .dir, .mm_addr, .spm_addr,
    .len, .busy, .done, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid,
    .mem_rdata, .spm_en, .spm_we, .spm_waddr, .spm_wdata, .spm_rdata);

  spm #(.NBANK(NB), .DEPTH(D)) u_spm (.clk, .rd_en(1'b0), .rd_row('0), .rd_data,
    .wr_en(1'b0), .wr_row('0), .wr_data, .dma_en(spm_en), .dma_we(spm_we),
    .dma_addr(spm_waddr), .dma_wdata(spm_wdata), .dma_rdata(spm_rdata));

  main_memory_model #(.WORDS(4096), .LATENCY(LAT), .MAW(32), .STALL_PCT(20)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic d, int mm, int sa, int n, output int cycles);
    @(negedge clk);
    start = 1; dir = d; mm_addr = 32'(mm); spm_addr = SAW'(sa); len = 16'(n);
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    int cyc, n;
    for (int k = 0; k < int'(NB); k++) wr_data[k] = '0;
    for (int i = 0; i < 4096; i++) u_mem.mem[i] = {32'hC0DE_0000 + 32'(i), $urandom};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 3; pass++) begin
      int mm_src = 100 + pass * 300, mm_dst = 2000 + pass * 300, sa = 3 + pass * 17;
      n = 50 + pass * 40;
      run(1'b0, mm_src, sa, n, cyc);
      checks++;
      if (cyc > n * 2 + int'(LAT) + 10) begin
        failures++; $display("FAIL load of %0d words took %0d clocks", n, cyc);
      end
      // read back through the SPM port (the DMA is idle now)
      for (int w = 0; w < n; w++) begin
        @(negedge clk);
        force spm_en = 1'b1; force spm_we = 1'b0; force spm_waddr = SAW'(sa + w);
        @(posedge clk); #1;
        release spm_en; release spm_we; release spm_waddr;
        checks++;
        if (spm_rdata !== u_mem.mem[mm_src + w]) begin
          failures++; $display("FAIL spm word %0d got %h exp %h", w, spm_rdata, u_mem.mem[mm_src + w]);
        end
      end
      run(1'b1, mm_dst, sa, n, cyc);
      checks++;
      if (cyc > n * 2 + 10) begin
        failures++; $display("FAIL store of %0d words took %0d clocks", n, cyc);
      end
      for (int w = 0; w < n; w++) begin
        checks++;
        if (u_mem.mem[mm_dst + w] !== u_mem.mem[mm_src + w]) begin
          failures++; $display("FAIL stored word %0d", w);
        end
      end
      // the words around the destination block are untouched
      checks += 2;
      if (u_mem.mem[mm_dst - 1][63:32] !== 32'hC0DE_0000 + 32'(mm_dst - 1)) failures++;
      if (u_mem.mem[mm_dst + n][63:32] !== 32'hC0DE_0000 + 32'(mm_dst + n)) failures++;
    end
    run(1'b0, 0, 0, 0, cyc);
    checks++;
    if (cyc != 1 || busy) begin failures++; $display("FAIL zero-length command"); end
    $display("grant stalls seen: %0d", u_mem.stalls);
    checks++;
    if (u_mem.stalls == 0) begin failures++; $display("FAIL no back-pressure exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
