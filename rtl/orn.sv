// orn: operand routing network between two consecutive rows of the array.
// Every one of the three inputs (A, B, C) of every PE in row i+1 picks one
// source among the FU and TU outputs of the PEs of row i that lie at a
// horizontal distance of at most MCL (maximum connection length) columns, so
// there are 2*(2*MCL+1) sources and ceil(log2(2*(2*MCL+1))) select bits per
// input, three selects per PE, as in the document's PE diagram. Since every
// input selects independently, one output can feed any number of inputs
// (multicast), including both inputs of one FU. Data flows only forward.
// Select encoding (this design's): sel = 2*(d + MCL) + k, where d is the
// source column minus the destination column and k = 0 for the FU output,
// 1 for the TU output. A select naming a column outside the array, or a
// code >= 2*(2*MCL+1), delivers +0.0. The per-PE select word
// {sel_c, sel_b, sel_a} sits in a cfg_reg on the ORN chain, which runs from
// column 0 to column COLS-1. Routing is combinational.
// XBAR = 1 builds inputs A and B instead from the crossbar network of
// orn_xbar, as the document draws it: FU outputs only, through 1/2 CBs and
// 2x2 CBs. Input C keeps its select (the document does not show how TU
// values are routed), so each PE holds a single select on the chain, and the
// crossbar settings follow in one further link at the end of the chain:
// {cb_cfg, hcb_cfg} packed with hcb_cfg[0] in the LSBs (see orn_xbar).
// A crossbar cannot realise every combination of connections at once, which
// the select form can; XBAR = 0 is the default for that reason.
module orn
  import lsrdp_pkg::*;
#(
  parameter int unsigned COLS = 32,
  parameter int unsigned MCL  = 1,
  parameter bit          XBAR = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  shift,
  input  logic  si,
  output logic  so,
  input  logic  commit,
  input  fp64_t fu_o [COLS],
  input  fp64_t tu_o [COLS],
  output fp64_t a    [COLS],
  output fp64_t b    [COLS],
  output fp64_t c    [COLS]
);

  localparam int unsigned SELW = orn_sel_w(MCL);
  localparam int unsigned NSRC = 2 * (2 * MCL + 1);

  localparam int unsigned NSEL = XBAR ? 1 : 3;   // selects held per PE
  localparam int unsigned K    = 2 * MCL;
  localparam int unsigned NCB  = COLS + K;

  logic [COLS:0] chain;
  assign chain[0] = si;

  fp64_t xa [COLS];
  fp64_t xb [COLS];

  if (XBAR) begin : g_xbar
    localparam int unsigned XW = 2 * COLS + 2 * K * NCB;
    logic [XW-1:0] xcfg;
    logic [1:0]    hcb_cfg [COLS];
    logic [1:0]    cb_cfg  [K][NCB];

    cfg_reg #(.W(XW)) u_xcfg (
      .clk, .rst_n, .shift, .si(chain[COLS]), .so, .commit, .q(xcfg)
    );
    for (genvar j = 0; j < COLS; j++) begin : g_h
      assign hcb_cfg[j] = xcfg[2*j +: 2];
    end
    for (genvar s = 0; s < K; s++) begin : g_s
      for (genvar i = 0; i < NCB; i++) begin : g_i
        assign cb_cfg[s][i] = xcfg[2*COLS + 2*(s*NCB + i) +: 2];
      end
    end
    orn_xbar #(.COLS(COLS), .MCL(MCL)) u_xbar (
      .hcb_cfg, .cb_cfg, .fu_o, .a(xa), .b(xb)
    );
  end else begin : g_mux
    assign so = chain[COLS];
    for (genvar j = 0; j < COLS; j++) begin : g_z
      assign xa[j] = '0;
      assign xb[j] = '0;
    end
  end

  for (genvar j = 0; j < COLS; j++) begin : g_col
    logic [NSEL*SELW-1:0] sel;

    cfg_reg #(.W(NSEL * SELW)) u_sel (
      .clk, .rst_n, .shift, .si(chain[j]), .so(chain[j+1]), .commit, .q(sel)
    );

    function automatic fp64_t pick(logic [SELW-1:0] s,
                                   fp64_t f [COLS], fp64_t t [COLS]);
      int src;
      if (32'(s) >= NSRC) return '0;
      src = j + int'(s) / 2 - int'(MCL);
      if (src < 0 || src >= int'(COLS)) return '0;
      return s[0] ? t[src] : f[src];
    endfunction

    if (XBAR) begin : g_x
      assign a[j] = xa[j];
      assign b[j] = xb[j];
      assign c[j] = pick(sel, fu_o, tu_o);
    end else begin : g_m
      assign a[j] = pick(sel[0*SELW +: SELW], fu_o, tu_o);
      assign b[j] = pick(sel[1*SELW +: SELW], fu_o, tu_o);
      assign c[j] = pick(sel[2*SELW +: SELW], fu_o, tu_o);
    end
  end

endmodule
