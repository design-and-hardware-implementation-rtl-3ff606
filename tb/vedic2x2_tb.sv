// vedic2x2_tb: exhaustive self-checking test of the 2x2 Vedic multiplier.
//
// Checks first the printed example 3 x 3 = 1001b, then all sixteen input
// pairs against the integer product a*b. Ends with a TB_RESULT line; a
// watchdog ends the run with a failure if the stimulus never completes.
module vedic2x2_tb;

  logic [1:0] a, b;
  logic [3:0] q;
  int checks = 0;
  int failures = 0;

  vedic2x2 dut (.a(a), .b(b), .q(q));

  initial begin
    a = 2'b11; b = 2'b11;
    #1;
    checks++;
    if (q != 4'b1001) begin
      failures++;
      $display("FAIL 11 x 11 -> %b, expected 1001", q);
    end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a = 2'(i); b = 2'(j);
        #1;
        checks++;
        if (q != 4'(i * j)) begin
          failures++;
          $display("FAIL %0d x %0d -> %0d", i, j, q);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog: stimulus did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
