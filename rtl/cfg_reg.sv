// cfg_reg: one link of a serial configuration chain, with a shadow copy.
// Configuration bits (PE operation, ORN selects, or a 64-bit immediate value)
// are shifted in one bit per clock while shift = 1: bits enter at the MSB of
// the shadow register and leave at its LSB on so, which feeds the next link
// of the chain. A one-cycle commit pulse copies the whole shadow register to
// the active register q that drives the data path. The document describes a
// serial configuration chain and pre-configuration that overlaps with
// operation, followed by a one-cycle reconfiguration; the shadow/active split
// is how this design realises that. Reset clears both copies.
module cfg_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,   // shift the shadow register by one bit
  input  logic         si,      // serial input (from the previous link)
  output logic         so,      // serial output (to the next link)
  input  logic         commit,  // copy shadow -> active
  output logic [W-1:0] q        // active configuration
);

  logic [W-1:0] shadow;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shadow <= '0;
      q      <= '0;
    end else begin
      if (shift)  shadow <= (W > 1) ? {si, shadow[W-1:1]} : W'(si);
      if (commit) q      <= shadow;
    end
  end

  assign so = shadow[0];

endmodule
