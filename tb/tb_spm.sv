// tb_spm: checks the scratchpad (4 banks x 16 words). Words written through
// the DMA port and rows written through the LSRDP write port are read back
// through both read ports, one clock after the read is issued, and compared
// with a shadow copy; a same-clock write of one word from both write ports
// leaves the LSRDP value.
module tb_spm;
  import lsrdp_pkg::*;
  localparam int unsigned NB = 4, D = 16;
  localparam int unsigned RAW = $clog2(D), WAW = $clog2(NB * D);

  logic clk = 0;
  always #5 clk = ~clk;
  logic rd_en = 0, wr_en = 0, dma_en = 0, dma_we = 0;
  logic [RAW-1:0] rd_row = '0, wr_row = '0;
  logic [WAW-1:0] dma_addr = '0;
  fp64_t rd_data [NB];
  fp64_t wr_data [NB];
  fp64_t dma_wdata = '0, dma_rdata;
  fp64_t shadow [NB*D];
  int checks = 0, failures = 0;

  spm #(.NBANK(NB), .DEPTH(D)) dut (.clk, .rd_en, .rd_row, .rd_data, .wr_en, .wr_row,
    .wr_data, .dma_en, .dma_we, .dma_addr, .dma_wdata, .dma_rdata);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(fp64_t got, fp64_t exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    for (int k = 0; k < int'(NB); k++) wr_data[k] = '0;
    // fill every word through the DMA port
    for (int w = 0; w < int'(NB*D); w++) begin
      @(negedge clk);
      dma_en = 1; dma_we = 1; dma_addr = WAW'(w); dma_wdata = {$urandom, $urandom};
      shadow[w] = dma_wdata;
    end
    @(negedge clk); dma_en = 0; dma_we = 0;
    // overwrite some rows through the LSRDP port
    for (int r = 0; r < int'(D); r += 3) begin
      @(negedge clk);
      wr_en = 1; wr_row = RAW'(r);
      for (int k = 0; k < int'(NB); k++) begin
        wr_data[k] = {$urandom, $urandom};
        shadow[r*NB + k] = wr_data[k];
      end
    end
    @(negedge clk); wr_en = 0;
    // same-word collision: LSRDP write wins
    @(negedge clk);
    wr_en = 1; wr_row = 5; dma_en = 1; dma_we = 1; dma_addr = WAW'(5*NB + 2);
    dma_wdata = 64'h1111; for (int k = 0; k < int'(NB); k++) wr_data[k] = 64'h2222 + 64'(k);
    for (int k = 0; k < int'(NB); k++) shadow[5*NB + k] = 64'h2222 + 64'(k);
    @(negedge clk); wr_en = 0; dma_en = 0; dma_we = 0;
    // read every row through the LSRDP port and every word through DMA
    for (int r = 0; r < int'(D); r++) begin
      @(negedge clk); rd_en = 1; rd_row = RAW'(r);
      @(posedge clk); #1; rd_en = 0;
      for (int k = 0; k < int'(NB); k++) chk(rd_data[k], shadow[r*NB + k], "row read");
    end
    for (int w = 0; w < int'(NB*D); w++) begin
      @(negedge clk); dma_en = 1; dma_we = 0; dma_addr = WAW'(w);
      @(posedge clk); #1; dma_en = 0;
      chk(dma_rdata, shadow[w], "dma read");
    end
    // back-to-back DMA reads: one word per clock
    @(negedge clk); dma_en = 1; dma_addr = 7;
    @(negedge clk); dma_addr = 9; chk(dma_rdata, shadow[7], "pipelined dma read 0");
    @(negedge clk); dma_en = 0;      chk(dma_rdata, shadow[9], "pipelined dma read 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
