// lsrdp_system: the accelerator side of the hybrid computer: the LSRDP array,
// its scratchpad memory (SPM), the DMA engine that fills and drains the SPM
// from main memory, and the controller that loads configurations and streams
// SPM rows through the array. The general-purpose host processor and the main
// memory are outside: the host drives the three command interfaces (bitstream,
// execution, DMA) and main memory answers the DMA's request/response port.
// A typical use: DMA the input vectors into SPM rows; stream the
// configuration bitstream (this can overlap with a previous run); start an
// execution with exec_reconf = 1, which commits the waiting configuration in
// one clock and streams exec_nvec rows, one per clock, through the array,
// writing each result row ROWS+1 clocks after its read; DMA the results back.
// Row layout: SPM bank 2j feeds input A of PE j in the first array row and
// bank 2j+1 its inputs B and C; the FU result of PE j in the last row lands
// in bank 2j and its TU value in bank 2j+1.
// The block structure follows the document's system diagram. Array sizes,
// SPM depth and all interface protocols are this design's choices.
module lsrdp_system
  import lsrdp_pkg::*;
#(
  parameter int unsigned ROWS      = 8,
  parameter int unsigned COLS      = 32,
  parameter int unsigned MCL       = 1,
  parameter bit          XBAR_ORN  = 1'b0,
  parameter int unsigned SPM_DEPTH = 1024,
  parameter int unsigned MAW       = 32,
  parameter int unsigned NW        = 16,
  localparam int unsigned NBANK    = 2 * COLS,
  localparam int unsigned RAW      = $clog2(SPM_DEPTH),
  localparam int unsigned SAW      = $clog2(NBANK * SPM_DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  // configuration bitstream from the host
  input  logic            cfg_start,
  input  logic            cfg_valid,
  input  logic [ROWS-1:0] cfg_imm,
  input  logic [ROWS-1:0] cfg_pe,
  input  logic [ROWS-1:0] cfg_orn,
  output logic            cfg_ready,
  output logic            cfg_loading,
  // execution commands from the host
  input  logic            exec_start,
  input  logic            exec_reconf,
  input  logic [RAW-1:0]  exec_src,
  input  logic [RAW-1:0]  exec_dst,
  input  logic [NW-1:0]   exec_nvec,
  output logic            exec_busy,
  output logic            exec_done,
  output logic [31:0]     stall_cycles,
  // DMA commands from the host
  input  logic            dma_start,
  input  logic            dma_dir,
  input  logic [MAW-1:0]  dma_mm_addr,
  input  logic [SAW-1:0]  dma_spm_addr,
  input  logic [NW-1:0]   dma_len,
  output logic            dma_busy,
  output logic            dma_done,
  // main memory port
  output logic            mem_req,
  output logic            mem_we,
  output logic [MAW-1:0]  mem_addr,
  output fp64_t           mem_wdata,
  input  logic            mem_gnt,
  input  logic            mem_rvalid,
  input  fp64_t           mem_rdata
);

  logic            imm_shift, pe_shift, orn_shift, commit;
  logic [ROWS-1:0] imm_si, pe_si, orn_si;
  logic [ROWS-1:0] imm_so, pe_so, orn_so;
  logic            spm_rd_en, spm_wr_en, in_valid, out_valid;
  logic [RAW-1:0]  spm_rd_row, spm_wr_row;
  fp64_t           rd_data  [NBANK];
  fp64_t           out_data [NBANK];
  logic            d_en, d_we;
  logic [SAW-1:0]  d_addr;
  fp64_t           d_wdata, d_rdata;

  lsrdp_ctrl #(
    .ROWS(ROWS), .COLS(COLS), .MCL(MCL), .XBAR_ORN(XBAR_ORN), .RAW(RAW), .NW(NW)
  ) u_ctrl (
    .clk, .rst_n,
    .cfg_start, .cfg_valid, .cfg_imm, .cfg_pe, .cfg_orn, .cfg_ready, .cfg_loading,
    .exec_start, .exec_reconf, .exec_src, .exec_dst, .exec_nvec,
    .exec_busy, .exec_done, .stall_cycles,
    .imm_shift, .pe_shift, .orn_shift, .imm_si, .pe_si, .orn_si, .commit,
    .spm_rd_en, .spm_rd_row, .lsrdp_in_valid(in_valid),
    .lsrdp_out_valid(out_valid), .spm_wr_en, .spm_wr_row
  );

  lsrdp #(.ROWS(ROWS), .COLS(COLS), .MCL(MCL), .XBAR_ORN(XBAR_ORN)) u_lsrdp (
    .clk, .rst_n,
    .imm_shift, .pe_shift, .orn_shift, .imm_si, .pe_si, .orn_si,
    .imm_so, .pe_so, .orn_so, .commit,
    .in_valid, .in_data(rd_data), .out_valid, .out_data
  );

  spm #(.NBANK(NBANK), .DEPTH(SPM_DEPTH)) u_spm (
    .clk,
    .rd_en(spm_rd_en), .rd_row(spm_rd_row), .rd_data,
    .wr_en(spm_wr_en), .wr_row(spm_wr_row), .wr_data(out_data),
    .dma_en(d_en), .dma_we(d_we), .dma_addr(d_addr),
    .dma_wdata(d_wdata), .dma_rdata(d_rdata)
  );

  dma #(.MAW(MAW), .SAW(SAW), .LENW(NW)) u_dma (
    .clk, .rst_n,
    .start(dma_start), .dir(dma_dir), .mm_addr(dma_mm_addr),
    .spm_addr(dma_spm_addr), .len(dma_len), .busy(dma_busy), .done(dma_done),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata,
    .spm_en(d_en), .spm_we(d_we), .spm_waddr(d_addr), .spm_wdata(d_wdata),
    .spm_rdata(d_rdata)
  );

endmodule
