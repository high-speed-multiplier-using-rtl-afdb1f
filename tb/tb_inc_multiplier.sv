// tb_inc_multiplier: end-to-end, self-checking testbench of the
// incremental-adder array multiplier.
//
// The main instance keeps every default (the 4 x 4 array) and is driven
// with all 256 operand pairs; each product is compared with the integer
// product a * b. Other array sizes are exercised by
// tb_inc_multiplier_sizes.
//
// The multiplier's mechanisms are observed in the 4 x 4 array through the
// select inputs of its cells: a cell is bypassed when its partial product
// and carry are both 0, increments when exactly one is 1, and adds two
// when both are 1 (full-adder cells only). Every cell of the array must
// show each of its cases at least once; a case never seen is a failure.
// The array has no clock: outputs are checked 1 time unit after the
// inputs change, and a clock-counted watchdog guards the run.
module tb_inc_multiplier;

  localparam int unsigned N = 4;   // default of inc_multiplier

  int checks   = 0;
  int failures = 0;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;

  inc_multiplier u_dut (.a(a), .b(b), .p(p));

  // Case counters per cell: [row][col] for the carry-save rows (row 1 is
  // the half-adder row), [col] for the final ripple row (col 0 is a half
  // adder).
  int cs_bypass [N-1:1][N-2:0];
  int cs_inc    [N-1:1][N-2:0];
  int cs_two    [N-1:1][N-2:0];
  int fin_bypass[N-2:0];
  int fin_inc   [N-2:0];
  int fin_two   [N-2:0];

  task automatic sample_cases();
    for (int j = 1; j < N; j++)
      for (int i = 0; i < N-1; i++) begin
        logic sb, sc;
        sb = u_dut.row_b[j][i];
        sc = (j == 1) ? 1'b0 : u_dut.row_ci[j][i];
        if (!sb && !sc)     cs_bypass[j][i]++;
        else if (sb && sc)  cs_two[j][i]++;
        else                cs_inc[j][i]++;
      end
    for (int k = 0; k < N-1; k++) begin
      logic sb, sc;
      sb = u_dut.fin_b[k];
      sc = (k == 0) ? 1'b0 : u_dut.fin_ci[k];
      if (!sb && !sc)     fin_bypass[k]++;
      else if (sb && sc)  fin_two[k]++;
      else                fin_inc[k]++;
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int tot_bypass, tot_inc, tot_two;
    logic [2*N-1:0] want;

    for (int j = 1; j < N; j++)
      for (int i = 0; i < N-1; i++) begin
        cs_bypass[j][i] = 0;
        cs_inc[j][i]    = 0;
        cs_two[j][i]    = 0;
      end
    for (int k = 0; k < N-1; k++) begin
      fin_bypass[k] = 0;
      fin_inc[k]    = 0;
      fin_two[k]    = 0;
    end
    a  = '0;
    b  = '0;

    // Exhaustive run of the default 4 x 4 array.
    for (int x = 0; x < (1 << N); x++)
      for (int y = 0; y < (1 << N); y++) begin
        a = x[N-1:0];
        b = y[N-1:0];
        want = (2*N)'(x * y);
        #1;
        checks++;
        if (p !== want) begin
          failures++;
          $display("FAIL N=4 %0d * %0d: got %0d want %0d", x, y, p, want);
        end
        sample_cases();
      end

    // Coverage of the cell cases, cell by cell.
    tot_bypass = 0;
    tot_inc    = 0;
    tot_two    = 0;
    for (int j = 1; j < N; j++)
      for (int i = 0; i < N-1; i++) begin
        tot_bypass += cs_bypass[j][i];
        tot_inc    += cs_inc[j][i];
        tot_two    += cs_two[j][i];
        checks++;
        if (cs_bypass[j][i] == 0 || cs_inc[j][i] == 0 ||
            (j > 1 && cs_two[j][i] == 0)) begin
          failures++;
          $display("FAIL cell (%0d,%0d): bypass=%0d inc=%0d two=%0d",
                   i, j, cs_bypass[j][i], cs_inc[j][i], cs_two[j][i]);
        end
      end
    for (int k = 0; k < N-1; k++) begin
      tot_bypass += fin_bypass[k];
      tot_inc    += fin_inc[k];
      tot_two    += fin_two[k];
      checks++;
      if (fin_bypass[k] == 0 || fin_inc[k] == 0 ||
          (k > 0 && fin_two[k] == 0)) begin
        failures++;
        $display("FAIL final cell %0d: bypass=%0d inc=%0d two=%0d",
                 k, fin_bypass[k], fin_inc[k], fin_two[k]);
      end
    end
    $display("4x4 cell cases over 256 products: bypass=%0d increment=%0d add_two=%0d",
             tot_bypass, tot_inc, tot_two);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
