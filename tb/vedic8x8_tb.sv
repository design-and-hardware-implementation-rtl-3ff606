// vedic8x8_tb: exhaustive self-checking test of the 8x8 Vedic multiplier.
//
// Applies all 65536 input pairs and compares q with the integer product.
// Ends with a TB_RESULT line; a watchdog ends the run with a failure if the
// stimulus never completes.
module vedic8x8_tb;

  logic [7:0]  a, b;
  logic [15:0] q;
  int checks = 0;
  int failures = 0;

  vedic8x8 dut (.a(a), .b(b), .q(q));

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (q != 16'(i * j)) begin
          failures++;
          if (failures <= 10) $display("FAIL %0d x %0d -> %0d", i, j, q);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog: stimulus did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
