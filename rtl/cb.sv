// cb: 2x2 crossbar switch (CB) of the crossbar-based operand routing network.
// Besides the usual 'bar' (in0 -> out0, in1 -> out1) and 'cross'
// (in0 -> out1, in1 -> out0) settings it can multicast either input to both
// outputs, which the document requires so that one FU result can reach
// several PEs. Combinational; the 2-bit setting encoding is this design's.
module cb
  import lsrdp_pkg::*;
(
  input  logic [1:0] cfg,   // 0 bar, 1 cross, 2 multicast in0, 3 multicast in1
  input  fp64_t      in0,
  input  fp64_t      in1,
  output fp64_t      out0,
  output fp64_t      out1
);

  always_comb begin
    unique case (cfg)
      2'd0:    begin out0 = in0; out1 = in1; end
      2'd1:    begin out0 = in1; out1 = in0; end
      2'd2:    begin out0 = in0; out1 = in0; end
      default: begin out0 = in1; out1 = in1; end
    endcase
  end

endmodule
