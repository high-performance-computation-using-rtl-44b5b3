// lsrdp_ctrl: configuration and execution sequencer of the LSRDP.
// Configuration: cfg_start begins a new bitstream. The host then supplies one
// beat per clock with cfg_valid; a beat carries one bit for each of the
// 3*ROWS serial chains of the array (immediate, PE and ORN chain of every
// row). The controller counts beats and shifts each chain kind only for as
// many beats as that chain is long (IMM_LEN, PE_LEN, ORN_LEN bits), so the
// first beats load all three kinds and the remainder only the immediates.
// After the last beat the new configuration waits, complete but inactive, in
// the shadow registers (cfg_ready = 1): this is the wait state the document
// puts between configuration and operation, and loading can overlap with a
// computation that still uses the active configuration.
// Execution: exec_start with a first source row, first destination row and a
// vector count streams nvec SPM rows through the array and writes the result
// rows back to the SPM. With exec_reconf = 1 the controller first waits until
// a configuration is ready (counted in stall_cycles) and then commits it in a
// single clock (the document's one-clock reconfiguration latency); with
// exec_reconf = 0 it reuses the active configuration. One row is read per
// clock; results appear ROWS+1 clocks after their read (one clock of SPM
// latency plus one per array row) and are written as out_valid arrives;
// exec_done pulses after the last write.
// The phases follow the document; beat format, commands and counters are this
// design's.
module lsrdp_ctrl #(
  parameter int unsigned ROWS    = 8,
  parameter int unsigned COLS    = 32,
  parameter int unsigned MCL     = 1,
  parameter bit          XBAR_ORN = 1'b0,
  parameter int unsigned RAW     = 10,  // SPM row address width
  parameter int unsigned NW      = 16,  // vector count width
  localparam int unsigned IMM_LEN = 64 * COLS,
  localparam int unsigned PE_LEN  = lsrdp_pkg::PE_CFG_W * COLS,
  localparam int unsigned ORN_LEN = lsrdp_pkg::orn_chain_len(COLS, MCL, XBAR_ORN),
  localparam int unsigned CFG_LEN = (IMM_LEN > PE_LEN) ?
                                    ((IMM_LEN > ORN_LEN) ? IMM_LEN : ORN_LEN) :
                                    ((PE_LEN > ORN_LEN) ? PE_LEN : ORN_LEN),
  localparam int unsigned CW      = $clog2(CFG_LEN + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // configuration bitstream
  input  logic            cfg_start,
  input  logic            cfg_valid,
  input  logic [ROWS-1:0] cfg_imm,
  input  logic [ROWS-1:0] cfg_pe,
  input  logic [ROWS-1:0] cfg_orn,
  output logic            cfg_ready,
  output logic            cfg_loading,
  // execution command
  input  logic            exec_start,
  input  logic            exec_reconf,
  input  logic [RAW-1:0]  exec_src,
  input  logic [RAW-1:0]  exec_dst,
  input  logic [NW-1:0]   exec_nvec,
  output logic            exec_busy,
  output logic            exec_done,
  output logic [31:0]     stall_cycles,
  // LSRDP configuration chains
  output logic            imm_shift,
  output logic            pe_shift,
  output logic            orn_shift,
  output logic [ROWS-1:0] imm_si,
  output logic [ROWS-1:0] pe_si,
  output logic [ROWS-1:0] orn_si,
  output logic            commit,
  // LSRDP data stream via the SPM
  output logic            spm_rd_en,
  output logic [RAW-1:0]  spm_rd_row,
  output logic            lsrdp_in_valid,
  input  logic            lsrdp_out_valid,
  output logic            spm_wr_en,
  output logic [RAW-1:0]  spm_wr_row
);

  typedef enum logic [1:0] {CFG_IDLE, CFG_SHIFT, CFG_READY} cfg_state_e;
  typedef enum logic [1:0] {EX_IDLE, EX_WAIT_CFG, EX_STREAM} ex_state_e;

  cfg_state_e     cfg_state;
  ex_state_e      ex_state;
  logic [CW-1:0]  beat;
  logic [RAW-1:0] src_q, dst_q;
  logic [NW-1:0]  nvec_q, n_rd, n_wr;
  logic           shifting;

  // configuration shifting
  assign shifting    = (cfg_state == CFG_SHIFT) && cfg_valid;
  assign imm_shift   = shifting && (32'(beat) < IMM_LEN);
  assign pe_shift    = shifting && (32'(beat) < PE_LEN);
  assign orn_shift   = shifting && (32'(beat) < ORN_LEN);
  assign imm_si      = cfg_imm;
  assign pe_si       = cfg_pe;
  assign orn_si      = cfg_orn;
  assign cfg_ready   = (cfg_state == CFG_READY);
  assign cfg_loading = (cfg_state == CFG_SHIFT);

  // commit: a single clock, once a complete configuration is waiting
  assign commit = (ex_state == EX_WAIT_CFG) && (cfg_state == CFG_READY);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_state <= CFG_IDLE;
      beat      <= '0;
    end else begin
      if (cfg_start) begin
        cfg_state <= CFG_SHIFT;
        beat      <= '0;
      end else if (shifting) begin
        beat <= beat + 1'b1;
        if (32'(beat) == CFG_LEN - 1) cfg_state <= CFG_READY;
      end else if (commit) begin
        cfg_state <= CFG_IDLE;
      end
    end
  end

  // execution
  assign exec_busy      = (ex_state != EX_IDLE);
  assign spm_rd_en      = (ex_state == EX_STREAM) && (n_rd != nvec_q);
  assign spm_rd_row     = src_q + RAW'(n_rd);
  assign spm_wr_en      = (ex_state == EX_STREAM) && lsrdp_out_valid;
  assign spm_wr_row     = dst_q + RAW'(n_wr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_state       <= EX_IDLE;
      src_q          <= '0;
      dst_q          <= '0;
      nvec_q         <= '0;
      n_rd           <= '0;
      n_wr           <= '0;
      exec_done      <= 1'b0;
      lsrdp_in_valid <= 1'b0;
      stall_cycles   <= '0;
    end else begin
      exec_done      <= 1'b0;
      lsrdp_in_valid <= spm_rd_en;   // SPM data arrives one clock after the read
      unique case (ex_state)
        EX_IDLE: begin
          if (exec_start) begin
            src_q    <= exec_src;
            dst_q    <= exec_dst;
            nvec_q   <= exec_nvec;
            n_rd     <= '0;
            n_wr     <= '0;
            if (exec_nvec == '0) exec_done <= 1'b1;
            else ex_state <= exec_reconf ? EX_WAIT_CFG : EX_STREAM;
          end
        end
        EX_WAIT_CFG: begin
          if (commit) ex_state <= EX_STREAM;
          else        stall_cycles <= stall_cycles + 1'b1;
        end
        EX_STREAM: begin
          if (spm_rd_en) n_rd <= n_rd + 1'b1;
          if (spm_wr_en) begin
            n_wr <= n_wr + 1'b1;
            if (n_wr + 1'b1 == nvec_q) begin
              ex_state  <= EX_IDLE;
              exec_done <= 1'b1;
            end
          end
        end
        default: ex_state <= EX_IDLE;
      endcase
    end
  end

endmodule
