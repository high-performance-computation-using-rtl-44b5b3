// half_cb: one-input crossbar switch (1/2 CB) at the entry of the crossbar
// ORN. It sends its input, an FU result, to out0, to out1, or to both, as the
// document describes; an output that is not selected carries +0.0.
// cfg[0] enables out0 and cfg[1] enables out1 (encoding is this design's).
// Combinational.
module half_cb
  import lsrdp_pkg::*;
(
  input  logic [1:0] cfg,
  input  fp64_t      in,
  output fp64_t      out0,
  output fp64_t      out1
);

  assign out0 = cfg[0] ? in : '0;
  assign out1 = cfg[1] ? in : '0;

endmodule
