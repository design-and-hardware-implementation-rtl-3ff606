// vedic16x16_sweep_tb: ordered operand sweep of the 16x16 Vedic multiplier.
//
// Walks a in an outer loop and b over all 65536 values in an inner loop,
// one operand pair per nanosecond, and compares qout with the integer
// product. The full 2^32-pair sweep takes hours in simulation, so this test
// covers the rows a = 0 .. ROWS/2-1 and a = 65536-ROWS/2 .. 65535, i.e.
// ROWS * 65536 pairs, with both the smallest and the largest multipliers.
// It stops early after 100 mismatches. Ends with a TB_RESULT line; a
// watchdog ends the run with a failure if the stimulus never completes.
module vedic16x16_sweep_tb;

  localparam int unsigned ROWS = 512;

  logic [15:0] a, b;
  logic [31:0] qout;
  int checks = 0;
  int failures = 0;

  vedic16x16 dut (.a(a), .b(b), .qout(qout));

  initial begin
    int unsigned ai;
    for (int r = 0; r < ROWS && failures < 100; r++) begin
      ai = (r < ROWS / 2) ? r : 65536 - ROWS + r;
      for (int j = 0; j < 65536; j++) begin
        a = 16'(ai); b = 16'(j);
        #1;
        checks++;
        if (qout != 32'(ai) * 32'(j)) begin
          failures++;
          if (failures <= 10) $display("FAIL %0d x %0d -> %0d", ai, j, qout);
        end
      end
    end
    $display("rows swept: %0d of 65536, pairs: %0d", ROWS, checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd100_000_000);
    failures++;
    $display("watchdog: stimulus did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
