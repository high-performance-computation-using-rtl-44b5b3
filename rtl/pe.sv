// pe: reconfigurable processing element of the LSRDP array.
// A PE has three operand inputs and two outputs. Inputs A and B feed the
// functional unit (FU); a multiplexer replaces B with the PE's 64-bit
// immediate register when imm_sel is set, so the FU computes A op B or
// A op IMM. Input C feeds the transfer unit (TU), a one-clock register that
// carries a value on to the next row without computing on it. Both outputs
// are registered, so a PE has a latency of one clock on either path.
// Two configuration links sit in the PE: the immediate register on the
// immediate chain and the 3-bit PE configuration word {imm_sel, op} on the PE
// chain; both load serially and take effect on commit.
// The structure (immediate register, MUX, FU, TU, configuration registers on
// serial chains) follows the document's PE diagram; latencies and encodings
// are this design's.
module pe
  import lsrdp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // configuration chains
  input  logic  imm_shift,
  input  logic  imm_si,
  output logic  imm_so,
  input  logic  pe_shift,
  input  logic  pe_si,
  output logic  pe_so,
  input  logic  commit,
  // data path
  input  fp64_t in_a,
  input  fp64_t in_b,
  input  fp64_t in_c,
  output fp64_t out_fu,
  output fp64_t out_tu
);

  logic [IMM_W-1:0]    imm;
  logic [PE_CFG_W-1:0] cfg_bits;
  pe_cfg_t             cfg;
  fp64_t               opnd_b;

  cfg_reg #(.W(IMM_W)) u_imm (
    .clk, .rst_n, .shift(imm_shift), .si(imm_si), .so(imm_so),
    .commit, .q(imm)
  );

  cfg_reg #(.W(PE_CFG_W)) u_cfg (
    .clk, .rst_n, .shift(pe_shift), .si(pe_si), .so(pe_so),
    .commit, .q(cfg_bits)
  );

  assign cfg    = pe_cfg_t'(cfg_bits);
  assign opnd_b = cfg.imm_sel ? imm : in_b;

  fu u_fu (.clk, .rst_n, .op(cfg.op), .a(in_a), .b(opnd_b), .y(out_fu));

  // transfer unit
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_tu <= '0;
    else        out_tu <= in_c;
  end

endmodule
