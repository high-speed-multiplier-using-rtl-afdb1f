// inc_ha_cell: half adder built from an (A+1) incremental adder.
//
// Computes sum and carry of a + b without a three-input adder. The
// operand a passes an isolating buffer into a 1-bit A+1 adder; two 2-to-1
// multiplexers, both selected by b, then choose:
//   b = 0: sum = a (the operand is bypassed), carry = the constant 0
//   b = 1: sum and carry are those of a + 1
// In the multiplier, a is the sum arriving from the row above and b the
// cell's partial product, so a zero partial product bypasses the cell.
//
// The mux structure (constant 0 on the carry mux's 0 input, a on the sum
// mux's 0 input, b as select) follows the document's cell figure. The
// buffer is modelled as operand isolation: the incrementer sees a AND b,
// so it holds still while the cell is bypassed. That gating, which
// changes no output, is this design's reading of the buffer.
//
// Interface: a, b in; s, c out. Purely combinational.
module inc_ha_cell (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);

  logic inc_in;   // incrementer operand after the isolating buffer
  logic inc_s;    // sum bit of inc_in + 1
  logic inc_c;    // carry of inc_in + 1

  assign inc_in = a & b;

  inc_adder #(.W(1)) u_inc (
    .a  (inc_in),
    .s  (inc_s),
    .co (inc_c)
  );

  always_comb begin
    c = b ? inc_c : 1'b0;
    s = b ? inc_s : a;
  end

endmodule
