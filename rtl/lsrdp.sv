// lsrdp: the large-scale reconfigurable data path, a ROWS x COLS array of
// PEs. Row 0 takes its operands from the input ports: PE j of row 0 gets
// A = in_data[2j] and B = C = in_data[2j+1]. Between row r-1 and row r an ORN
// routes FU and TU outputs forward to the three inputs of each PE of row r.
// The FU and TU outputs of the last row are the output ports:
// out_data[2j] = FU, out_data[2j+1] = TU of PE j. With 2*COLS = 64 ports of
// 64 bits the array moves 64 x 8 bytes per clock each way, the SPM <-> LSRDP
// bandwidth the document states. Every row adds one clock, so a vector
// presented with in_valid leaves ROWS clocks later with out_valid; a new
// vector can enter every clock (a loop body mapped onto the array runs as a
// pipeline).
// Configuration: every row has three serial chains, running from column 0 to
// column COLS-1 as in the document's PE diagram: the immediate chain
// (64 bits per PE), the PE chain (3 bits per PE) and the ORN chain (3 selects
// per PE, for the ORN that feeds this row; row 0 has none). The chains shift
// while their shift input is high and a one-clock commit makes the shifted
// configuration active everywhere at once, so a new configuration can be
// shifted in while the array computes with the old one.
// The array shape, ORNs and chains follow the document; ROWS and COLS are not
// given there and the defaults are this design's, MCL = 1 matches the
// three-connection crossbar ORN the document draws. XBAR_ORN selects the
// select-based ORN (0, default) or the crossbar ORN (1) between rows.
module lsrdp
  import lsrdp_pkg::*;
#(
  parameter int unsigned ROWS = 8,
  parameter int unsigned COLS = 32,
  parameter int unsigned MCL  = 1,
  parameter bit          XBAR_ORN = 1'b0   // 1: crossbar ORNs (see orn)
) (
  input  logic            clk,
  input  logic            rst_n,
  // configuration chains (one serial input per row and chain kind)
  input  logic            imm_shift,
  input  logic            pe_shift,
  input  logic            orn_shift,
  input  logic [ROWS-1:0] imm_si,
  input  logic [ROWS-1:0] pe_si,
  input  logic [ROWS-1:0] orn_si,   // bit 0 unused: row 0 has no ORN
  output logic [ROWS-1:0] imm_so,
  output logic [ROWS-1:0] pe_so,
  output logic [ROWS-1:0] orn_so,
  input  logic            commit,
  // data stream
  input  logic            in_valid,
  input  fp64_t           in_data  [2*COLS],
  output logic            out_valid,
  output fp64_t           out_data [2*COLS]
);

  fp64_t fu_o [ROWS][COLS];
  fp64_t tu_o [ROWS][COLS];
  fp64_t in_a [ROWS][COLS];
  fp64_t in_b [ROWS][COLS];
  fp64_t in_c [ROWS][COLS];
  logic  [ROWS-1:0] vpipe;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    logic [COLS:0] imm_ch, pe_ch;
    assign imm_ch[0]  = imm_si[r];
    assign pe_ch[0]   = pe_si[r];
    assign imm_so[r]  = imm_ch[COLS];
    assign pe_so[r]   = pe_ch[COLS];

    if (r == 0) begin : g_in
      for (genvar j = 0; j < COLS; j++) begin : g_port
        assign in_a[0][j] = in_data[2*j];
        assign in_b[0][j] = in_data[2*j+1];
        assign in_c[0][j] = in_data[2*j+1];
      end
      assign orn_so[0] = orn_si[0];
    end else begin : g_orn
      orn #(.COLS(COLS), .MCL(MCL), .XBAR(XBAR_ORN)) u_orn (
        .clk, .rst_n, .shift(orn_shift), .si(orn_si[r]), .so(orn_so[r]),
        .commit, .fu_o(fu_o[r-1]), .tu_o(tu_o[r-1]),
        .a(in_a[r]), .b(in_b[r]), .c(in_c[r])
      );
    end

    for (genvar j = 0; j < COLS; j++) begin : g_col
      pe u_pe (
        .clk, .rst_n,
        .imm_shift, .imm_si(imm_ch[j]), .imm_so(imm_ch[j+1]),
        .pe_shift,  .pe_si(pe_ch[j]),   .pe_so(pe_ch[j+1]),
        .commit,
        .in_a(in_a[r][j]), .in_b(in_b[r][j]), .in_c(in_c[r][j]),
        .out_fu(fu_o[r][j]), .out_tu(tu_o[r][j])
      );
    end
  end

  for (genvar j = 0; j < COLS; j++) begin : g_out
    assign out_data[2*j]   = fu_o[ROWS-1][j];
    assign out_data[2*j+1] = tu_o[ROWS-1][j];
  end

  // valid travels with the data: one clock per row
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= (ROWS > 1) ? {vpipe[ROWS-2:0], in_valid} : ROWS'(in_valid);
  end
  assign out_valid = vpipe[ROWS-1];

endmodule
