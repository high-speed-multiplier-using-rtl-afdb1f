// inc_fa_cell: full adder built from an (A+1) incremental adder.
//
// Computes a + b + ci by noting that, seen from the operand a, the other
// two inputs can only add 0, 1 or 2:
//   b = ci = 0: result a     -> sum = a,  carry = 0  (cell bypassed)
//   b != ci   : result a + 1 -> sum, carry from the A+1 adder
//   b = ci = 1: result a + 2 -> sum = a,  carry = 1
// So only a is processed; sel = b XOR ci drives both 2-to-1 multiplexers.
// When sel = 0 the sum mux passes a and the carry mux passes b AND ci,
// which covers both the bypass and the A+2 case.
//
// The A+1 / A+2 rule and the AND for the carry follow the document; the
// two muxes and the buffer follow its cell figure. The buffer is modelled
// as operand isolation (the incrementer sees a AND sel), this design's
// reading of it; it changes no output.
//
// Interface: a, b, ci in; s, co out. Purely combinational.
module inc_fa_cell (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  logic sel;      // 1: take a + 1
  logic inc_in;   // incrementer operand after the isolating buffer
  logic inc_s;
  logic inc_c;

  assign sel    = b ^ ci;
  assign inc_in = a & sel;

  inc_adder #(.W(1)) u_inc (
    .a  (inc_in),
    .s  (inc_s),
    .co (inc_c)
  );

  always_comb begin
    co = sel ? inc_c : (b & ci);
    s  = sel ? inc_s : a;
  end

endmodule
