// tb_inc_ha_cell: self-checking testbench for the incremental-adder half
// adder cell.
//
// Applies all four input pairs and checks that the cell adds them: sum is
// the exclusive OR and carry the AND of the inputs, including the bypass
// case b = 0 where the operand must reach the sum unchanged.
module tb_inc_ha_cell;

  int checks   = 0;
  int failures = 0;

  logic clk;
  initial clk = 1'b0;
  logic a, b, s, c;

  always #5 clk = ~clk;

  inc_ha_cell u_dut (.a(a), .b(b), .s(s), .c(c));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int sum;
    a = 1'b0;
    b = 1'b0;
    for (int v = 0; v < 4; v++) begin
      {a, b} = v[1:0];
      sum = int'(a) + int'(b);
      #1;
      checks++;
      if ({c, s} !== sum[1:0]) begin
        failures++;
        $display("FAIL a=%0d b=%0d: c=%0d s=%0d", a, b, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
