// vedic4x4_tb: exhaustive self-checking test of the 4x4 Vedic multiplier.
//
// First applies nine documented example vectors (a, b, a*b), then all 256
// input pairs, comparing q with the integer product. Ends with a TB_RESULT
// line; a watchdog ends the run with a failure if the stimulus never
// completes.
module vedic4x4_tb;

  logic [3:0] a, b;
  logic [7:0] q;
  int checks = 0;
  int failures = 0;

  // example vectors: {a, b, product}
  localparam int unsigned NV = 9;
  localparam int unsigned VEC[NV][3] = '{
    '{0, 15, 0}, '{0, 14, 0}, '{1, 13, 13}, '{2, 12, 24}, '{3, 11, 33},
    '{4, 10, 40}, '{5, 9, 45}, '{6, 8, 48}, '{7, 7, 49}
  };

  vedic4x4 dut (.a(a), .b(b), .q(q));

  task automatic check(input int unsigned ta, input int unsigned tb_,
                       input int unsigned expected);
    a = 4'(ta); b = 4'(tb_);
    #1;
    checks++;
    if (q != 8'(expected)) begin
      failures++;
      $display("FAIL %0d x %0d -> %0d, expected %0d", ta, tb_, q, expected);
    end
  endtask

  initial begin
    for (int v = 0; v < NV; v++) check(VEC[v][0], VEC[v][1], VEC[v][2]);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) check(i, j, i * j);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog: stimulus did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
