// fu: functional unit of a processing element. Computes A op B on 64-bit
// doubles, where op is ADD, SUB (A - B), MUL, or PASS (the FU forwards A and
// acts as a transfer unit), and registers the result, so the latency is one
// clock for every operation. Equal latency for all operations and for the
// transfer unit keeps all operands of a row aligned as data flows through
// the array. The operation set follows the document; the single-cycle latency
// is this design's choice (the document gives no FU latency).
module fu
  import lsrdp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  fu_op_e op,
  input  fp64_t  a,
  input  fp64_t  b,
  output fp64_t  y
);

  fp64_t sum, prod, res;

  fp64_add u_add (.a(a), .b(b), .sub(op == FU_SUB), .y(sum));
  fp64_mul u_mul (.a(a), .b(b), .y(prod));

  always_comb begin
    unique case (op)
      FU_ADD, FU_SUB: res = sum;
      FU_MUL:         res = prod;
      default:        res = a;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '0;
    else        y <= res;
  end

endmodule
