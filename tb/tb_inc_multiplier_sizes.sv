// tb_inc_multiplier_sizes: self-checking testbench of the incremental-adder
// array multiplier at sizes other than its 4 x 4 default.
//
// One instance per size in SIZES. Arrays of up to 8 bits are driven with
// every operand pair; wider ones with the corner operands (zero, one, all
// ones, top bit only) and 3000 random pairs. Each product is compared with
// the integer product. The smallest size, 2, has no full-adder rows at all
// and checks the edge cases of the array generator.
module tb_inc_multiplier_sizes;

  localparam int unsigned NSIZES = 6;
  localparam int unsigned SIZES [NSIZES] = '{2, 3, 5, 8, 16, 32};

  int checks   = 0;
  int failures = 0;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [NSIZES-1:0] done;

  for (genvar g = 0; g < NSIZES; g++) begin : g_size
    localparam int unsigned N = SIZES[g];

    logic [N-1:0]   a, b;
    logic [2*N-1:0] p;

    inc_multiplier #(.N(N)) u_dut (.a(a), .b(b), .p(p));

    task automatic check(input logic [N-1:0] x, input logic [N-1:0] y);
      logic [2*N-1:0] want;
      a = x;
      b = y;
      want = (2*N)'(x) * (2*N)'(y);
      #1;
      checks++;
      if (p !== want) begin
        failures++;
        $display("FAIL N=%0d %0d * %0d: got %0d want %0d", N, x, y, p, want);
      end
    endtask

    initial begin : run
      logic [N-1:0] one, top;
      done[g] = 1'b0;
      a = '0;
      b = '0;
      one = N'(1);
      top = one << (N-1);
      if (N <= 8) begin
        for (int x = 0; x < (1 << N); x++)
          for (int y = 0; y < (1 << N); y++)
            check(N'(x), N'(y));
      end else begin
        check('0, '0);
        check('1, '1);
        check('1, one);
        check(one, '1);
        check(top, top);
        check(top, '1);
        for (int t = 0; t < 3000; t++)
          check(N'({$urandom, $urandom}), N'({$urandom, $urandom}));
      end
      done[g] = 1'b1;
    end
  end

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : finish
    #0;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
