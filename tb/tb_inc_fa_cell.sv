// tb_inc_fa_cell: self-checking testbench for the incremental-adder full
// adder cell.
//
// Applies all eight input combinations and checks {co, s} against the
// integer sum a + b + ci. The three cases of the cell are all covered:
// bypass (b = ci = 0), increment (b != ci) and add-two (b = ci = 1); each
// is counted and a case that never occurred counts as a failure.
module tb_inc_fa_cell;

  int checks   = 0;
  int failures = 0;
  int n_bypass = 0, n_inc = 0, n_two = 0;

  logic clk;
  initial clk = 1'b0;
  logic a, b, ci, s, co;

  always #5 clk = ~clk;

  inc_fa_cell u_dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int sum;
    a  = 1'b0;
    b  = 1'b0;
    ci = 1'b0;
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = v[2:0];
      sum = int'(a) + int'(b) + int'(ci);
      if (!b && !ci)      n_bypass++;
      else if (b && ci)   n_two++;
      else                n_inc++;
      #1;
      checks++;
      if ({co, s} !== sum[1:0]) begin
        failures++;
        $display("FAIL a=%0d b=%0d ci=%0d: co=%0d s=%0d", a, b, ci, co, s);
      end
    end
    checks++;
    if (n_bypass == 0 || n_inc == 0 || n_two == 0) begin
      failures++;
      $display("FAIL a cell case never occurred");
    end
    $display("bypass=%0d increment=%0d add_two=%0d", n_bypass, n_inc, n_two);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
