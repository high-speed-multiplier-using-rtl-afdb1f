// inc_adder: the (A+1) incremental adder.
//
// Adds the constant one to a W-bit operand and returns the W-bit sum and
// the carry out, {co, s} = a + 1. It is the only arithmetic element of the
// incremental-adder multiplier: every half and full adder of the array is
// replaced by one of these, a 1-bit instance (W = 1), whose result is then
// chosen or bypassed by two 2-to-1 multiplexers (see inc_ha_cell and
// inc_fa_cell). For W = 1 the sum is the inverse of the operand and the
// carry equals the operand.
//
// The document names this adder and its function but not its gates; the
// plain sum a + 1 used here is this design's own choice. W defaults to 1,
// the width drawn in the cell figure.
//
// Interface: a (W bits) in; s (W bits) and co out. Purely combinational.
module inc_adder #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] a,
  output logic [W-1:0] s,
  output logic         co
);

  always_comb begin
    {co, s} = {1'b0, a} + (W+1)'(1);
  end

endmodule
