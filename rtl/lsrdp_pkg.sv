// lsrdp_pkg: types and constants shared by the reconfigurable data-path (LSRDP)
// accelerator. Operands are 64-bit IEEE-754 double-precision words. Each
// functional unit (FU) is configured with a 2-bit operation code and a 1-bit
// operand-B select (input port B or the PE's immediate register); these three
// bits form the PE configuration word shifted in over the PE configuration
// chain. The FU operation set (ADD, SUB, MUL, and a pass-through so an FU can
// act as a transfer unit) follows the text; the encodings are this design's.
package lsrdp_pkg;

  typedef logic [63:0] fp64_t;

  typedef enum logic [1:0] {
    FU_ADD  = 2'd0,   // A + B
    FU_SUB  = 2'd1,   // A - B
    FU_MUL  = 2'd2,   // A * B
    FU_PASS = 2'd3    // A (FU used as a transfer unit)
  } fu_op_e;

  // PE configuration word: {imm_sel, op}
  typedef struct packed {
    logic   imm_sel;  // 1: second operand is the immediate register
    fu_op_e op;
  } pe_cfg_t;

  localparam int unsigned PE_CFG_W = $bits(pe_cfg_t);
  localparam int unsigned IMM_W    = 64;

  // Operand routing network: each PE input chooses one of 2*(2*MCL+1)
  // sources (FU or TU output of a PE at horizontal distance -MCL..+MCL).
  function automatic int unsigned orn_sel_w(int unsigned mcl);
    return $clog2(2 * (2 * mcl + 1));
  endfunction

  // Length in bits of the ORN configuration chain of one row. Mux ORN: three
  // selects per PE. Crossbar ORN (xbar = 1): one select per PE for input C,
  // then 2 bits per 1/2 CB and 2 bits per CB slot of the 2*MCL CB stages.
  function automatic int unsigned orn_chain_len(int unsigned cols,
                                                int unsigned mcl, bit xbar);
    if (!xbar) return 3 * orn_sel_w(mcl) * cols;
    return orn_sel_w(mcl) * cols + 2 * cols + 2 * (2 * mcl) * (cols + 2 * mcl);
  endfunction

  localparam fp64_t FP64_QNAN = 64'h7FF8_0000_0000_0000;

endpackage
