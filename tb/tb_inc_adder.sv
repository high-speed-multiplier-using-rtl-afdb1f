// tb_inc_adder: self-checking testbench for the A+1 incremental adder.
//
// Drives every operand value into a 1-bit instance (the width the
// multiplier cells use) and a 4-bit instance, and compares sum and carry
// with the expected increment: for one bit, sum = not a and carry = a;
// for four bits, the sum wraps to 0 and the carry is set only at a = 15.
// A clock-counted watchdog ends the run with a failure if it hangs.
module tb_inc_adder;

  int checks   = 0;
  int failures = 0;

  logic       clk;
  initial clk = 1'b0;
  logic       a1;
  logic       s1, co1;
  logic [3:0] a4;
  logic [3:0] s4;
  logic       co4;

  always #5 clk = ~clk;

  inc_adder u_dut1 (.a(a1), .s(s1), .co(co1));
  inc_adder #(.W(4)) u_dut4 (.a(a4), .s(s4), .co(co4));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [3:0] exp_s;
    logic       exp_c;
    a1 = 1'b0;
    a4 = '0;
    for (int v = 0; v < 2; v++) begin
      a1 = v[0];
      #1;
      checks++;
      if (s1 !== ~v[0] || co1 !== v[0]) begin
        failures++;
        $display("FAIL W=1 a=%0d: s=%0d co=%0d", v, s1, co1);
      end
    end
    for (int v = 0; v < 16; v++) begin
      a4    = v[3:0];
      exp_s = (v == 15) ? 4'd0 : 4'(v + 1);
      exp_c = (v == 15);
      #1;
      checks++;
      if (s4 !== exp_s || co4 !== exp_c) begin
        failures++;
        $display("FAIL W=4 a=%0d: s=%0d co=%0d, want s=%0d co=%0d",
                 v, s4, co4, exp_s, exp_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
