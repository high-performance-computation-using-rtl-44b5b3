// orn_xbar: crossbar-based operand routing network, the checkerboard of
// crossbar switches the document draws for connecting the FU outputs of one
// row to the two FU inputs of the PEs in the next row.
// Geometry, in half-column steps: FU j of the source row sits at position 2j.
// Stage 0 is a 1/2 CB per FU; its out0 goes up (position - 1) and its out1
// down (position + 1). Stages 1..2*MCL are columns of 2x2 CBs at alternately
// odd and even positions; a CB at position x takes in0 from the node above
// (x - 1, its down output) and in1 from the node below (x + 1, its up
// output), and sends out0 up and out1 down. The CBs of the last stage sit at
// the even positions 2j and drive input A (out0) and input B (out1) of PE j.
// Each stage moves a value by at most half a column, so 2*MCL stages reach
// the 2*MCL+1 nearest PEs (an odd number, as the document requires); adding
// stages extends the reach. Stage s holds CBs at positions -s .. 2*(COLS-1)+s,
// the outermost ones standing for the links that leave the drawn array edge;
// they receive +0.0 where no neighbour exists.
// Configuration is given in parallel: hcb_cfg[j] for the 1/2 CB of FU j and
// cb_cfg[s-1][i] for CB number i (counted from the top) of stage s. Routing
// is combinational here; in the superconducting circuit every switch is a
// pipeline stage.
module orn_xbar
  import lsrdp_pkg::*;
#(
  parameter int unsigned COLS = 32,
  parameter int unsigned MCL  = 1,
  localparam int unsigned K   = 2 * MCL,          // CB stages
  localparam int unsigned NCB = COLS + K          // CB slots per stage
) (
  input  logic [1:0] hcb_cfg [COLS],
  input  logic [1:0] cb_cfg  [K][NCB],
  input  fp64_t      fu_o    [COLS],
  output fp64_t      a       [COLS],
  output fp64_t      b       [COLS]
);

  // node outputs indexed by position x + K, x in [-K, 2*(COLS-1)+K]
  localparam int unsigned NX = 2 * (COLS - 1) + 2 * K + 1;
  for (genvar s = 0; s <= K; s++) begin : g_stage
    fp64_t up [NX];   // outputs heading to position - 1
    fp64_t dn [NX];   // outputs heading to position + 1
    for (genvar i = 0; i < NX; i++) begin : g_pos
      // position x = i - K
      if (s == 0 && i >= K && (i - K) % 2 == 0 && (i - K) / 2 < COLS) begin : g_hcb
        half_cb u_hcb (
          .cfg(hcb_cfg[(i - K) / 2]), .in(fu_o[(i - K) / 2]),
          .out0(up[i]), .out1(dn[i])
        );
      end else if (s > 0 && (i + K + s) % 2 == 0 &&
                   i + s >= K && i <= 2 * (COLS - 1) + K + s) begin : g_cb
        fp64_t in0, in1;
        if (i > 0)      begin : g_i0 assign in0 = g_stage[s-1].dn[i-1]; end
        else            begin : g_z0 assign in0 = '0;           end
        if (i < NX - 1) begin : g_i1 assign in1 = g_stage[s-1].up[i+1]; end
        else            begin : g_z1 assign in1 = '0;           end
        cb u_cb (
          .cfg(cb_cfg[s-1][(i + s - K) / 2]), .in0(in0), .in1(in1),
          .out0(up[i]), .out1(dn[i])
        );
      end else begin : g_none
        assign up[i] = '0;
        assign dn[i] = '0;
      end
    end
  end

  for (genvar j = 0; j < COLS; j++) begin : g_out
    assign a[j] = g_stage[K].up[2 * j + K];
    assign b[j] = g_stage[K].dn[2 * j + K];
  end

endmodule
