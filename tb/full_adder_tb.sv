// full_adder_tb: exhaustive self-checking test of the one-bit full adder.
//
// Applies all eight input combinations and compares {cout, sum} with the
// integer sum x + y + cin. Ends with a TB_RESULT line; a watchdog ends the
// run with a failure if the stimulus never completes.
module full_adder_tb;

  logic x, y, cin, sum, cout;
  int   checks = 0;
  int   failures = 0;

  full_adder dut (.x(x), .y(y), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, y, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, sum} != 2'(int'(x) + int'(y) + int'(cin))) begin
        failures++;
        $display("FAIL x=%0d y=%0d cin=%0d -> sum=%0d cout=%0d", x, y, cin, sum, cout);
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
