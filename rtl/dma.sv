// dma: block transfer engine between main memory and the scratchpad (SPM).
// A command gives a direction (0: main memory -> SPM, 1: SPM -> main memory),
// a main-memory word address, an SPM word address and a length in 64-bit
// words; busy is high until the last word has moved, then done pulses for one
// clock. Addresses increment by one word.
// Main memory side: a request/grant handshake (mem_req with mem_we, mem_addr,
// mem_wdata is taken in a clock where mem_gnt is high) and in-order read
// responses on mem_rvalid/mem_rdata after any latency, so a load keeps issuing
// reads while earlier ones are still outstanding and hides the long main
// memory latency. A store reads the SPM ahead into a two-entry buffer so that
// one write can leave per clock. SPM side: the word port of spm, read latency
// one clock. The document names the DMA and the 64-bit data bus only; this
// command interface and handshake are this design's.
module dma
  import lsrdp_pkg::*;
#(
  parameter int unsigned MAW  = 32,   // main-memory word address width
  parameter int unsigned SAW  = 16,   // SPM word address width
  parameter int unsigned LENW = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  // command
  input  logic            start,
  input  logic            dir,        // 0: load (MM -> SPM), 1: store (SPM -> MM)
  input  logic [MAW-1:0]  mm_addr,
  input  logic [SAW-1:0]  spm_addr,
  input  logic [LENW-1:0] len,
  output logic            busy,
  output logic            done,
  // main memory
  output logic            mem_req,
  output logic            mem_we,
  output logic [MAW-1:0]  mem_addr,
  output fp64_t           mem_wdata,
  input  logic            mem_gnt,
  input  logic            mem_rvalid,
  input  fp64_t           mem_rdata,
  // SPM word port
  output logic            spm_en,
  output logic            spm_we,
  output logic [SAW-1:0]  spm_waddr,
  output fp64_t           spm_wdata,
  input  fp64_t           spm_rdata
);

  logic            dir_q;
  logic [MAW-1:0]  mm_base;
  logic [SAW-1:0]  spm_base;
  logic [LENW-1:0] len_q, issued, completed;
  // store path: SPM read-ahead buffer
  fp64_t           buf_q [2];
  logic [1:0]      buf_cnt;
  logic            buf_rd, buf_wr;  // read pointer, write pointer
  logic            rd_pend;
  logic [LENW-1:0] spm_rd_cnt;
  logic            spm_rd, mem_acc, push, pop;

  // main memory request
  always_comb begin
    mem_req   = 1'b0;
    mem_we    = dir_q;
    mem_addr  = mm_base + MAW'(issued);
    mem_wdata = buf_q[buf_rd];
    if (busy) begin
      if (!dir_q) mem_req = (issued != len_q);
      else        mem_req = (buf_cnt != 2'd0);
    end
  end
  assign mem_acc = mem_req && mem_gnt;

  // SPM access: load writes returning words, store reads ahead
  assign spm_rd = busy && dir_q && (spm_rd_cnt != len_q) &&
                  ((32'(buf_cnt) + 32'(rd_pend)) < 2 || ((32'(buf_cnt) + 32'(rd_pend)) == 2 && mem_acc));
  assign push   = rd_pend;
  assign pop    = busy && dir_q && mem_acc;

  always_comb begin
    spm_en    = 1'b0;
    spm_we    = 1'b0;
    spm_waddr = spm_base + SAW'(spm_rd_cnt);
    spm_wdata = mem_rdata;
    if (busy && !dir_q && mem_rvalid) begin
      spm_en    = 1'b1;
      spm_we    = 1'b1;
      spm_waddr = spm_base + SAW'(completed);
    end else if (spm_rd) begin
      spm_en    = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      dir_q      <= 1'b0;
      mm_base    <= '0;
      spm_base   <= '0;
      len_q      <= '0;
      issued     <= '0;
      completed  <= '0;
      buf_cnt    <= '0;
      buf_rd     <= 1'b0;
      buf_wr     <= 1'b0;
      rd_pend    <= 1'b0;
      spm_rd_cnt <= '0;
      buf_q[0]   <= '0;
      buf_q[1]   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy       <= (len != '0);
          done       <= (len == '0);
          dir_q      <= dir;
          mm_base    <= mm_addr;
          spm_base   <= spm_addr;
          len_q      <= len;
          issued     <= '0;
          completed  <= '0;
          spm_rd_cnt <= '0;
          buf_cnt    <= '0;
          buf_rd     <= 1'b0;
          buf_wr     <= 1'b0;
          rd_pend    <= 1'b0;
        end
      end else if (!dir_q) begin
        // load
        if (mem_acc)    issued    <= issued + 1'b1;
        if (mem_rvalid) completed <= completed + 1'b1;
        if (mem_rvalid && (completed + 1'b1 == len_q)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end else begin
        // store
        rd_pend <= spm_rd;
        if (spm_rd) spm_rd_cnt <= spm_rd_cnt + 1'b1;
        if (push) begin
          buf_q[buf_wr] <= spm_rdata;
          buf_wr        <= ~buf_wr;
        end
        if (pop) buf_rd <= ~buf_rd;
        buf_cnt <= buf_cnt + 2'(push) - 2'(pop);
        if (mem_acc) begin
          issued <= issued + 1'b1;
          if (issued + 1'b1 == len_q) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

endmodule
