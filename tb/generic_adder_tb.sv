// generic_adder_tb: self-checking test of the N-bit ripple-carry adder.
//
// Two instances: one at the default width (16 bits), checked on corner cases
// that make the carry ripple through every bit and on random operands, and a
// 4-bit one, checked exhaustively over all x, y and cin. The reference is
// the integer sum x + y + cin split into sum and carry out. Ends with a
// TB_RESULT line; a watchdog ends the run with a failure if the stimulus
// never completes.
module generic_adder_tb;

  localparam int unsigned W = 16;  // default width of generic_adder
  localparam int unsigned S = 4;   // small instance, tested exhaustively

  logic [W-1:0] x, y, sum;
  logic         cin, cout;
  logic [S-1:0] xs, ys, sums;
  logic         cins, couts;

  int checks = 0;
  int failures = 0;
  int full_ripples = 0;  // vectors whose carry runs from bit 0 out of bit W-1

  generic_adder dut (.x(x), .y(y), .cin(cin), .sum(sum), .cout(cout));

  generic_adder #(.N(S)) dut_small (
    .x(xs), .y(ys), .cin(cins), .sum(sums), .cout(couts)
  );

  task automatic check_wide(input logic [W-1:0] tx, input logic [W-1:0] ty,
                            input logic tc);
    logic [W:0] expected;
    x = tx; y = ty; cin = tc;
    #1;
    expected = {1'b0, tx} + {1'b0, ty} + {{W{1'b0}}, tc};
    checks++;
    if ({cout, sum} != expected) begin
      failures++;
      $display("FAIL N=%0d x=%h y=%h cin=%0d -> cout=%0d sum=%h, expected %h",
               W, tx, ty, tc, cout, sum, expected);
    end
    if (tc && ((tx ^ ty) == '1)) full_ripples++;
  endtask

  initial begin
    // carry from cin rippling through all W bits
    check_wide('1, '0, 1'b1);
    check_wide('0, '1, 1'b1);
    check_wide(16'h5555, 16'hAAAA, 1'b1);
    check_wide('1, '1, 1'b1);
    check_wide('1, '1, 1'b0);
    check_wide('0, '0, 1'b0);
    check_wide(16'h8000, 16'h8000, 1'b0);
    for (int i = 0; i < 20000; i++)
      check_wide(W'($urandom), W'($urandom), 1'($urandom));

    for (int v = 0; v < (1 << (2 * S + 1)); v++) begin
      {xs, ys, cins} = (2 * S + 1)'(v);
      #1;
      checks++;
      if ({couts, sums} != ({1'b0, xs} + {1'b0, ys} + (S + 1)'(cins))) begin
        failures++;
        $display("FAIL N=%0d x=%h y=%h cin=%0d -> cout=%0d sum=%h",
                 S, xs, ys, cins, couts, sums);
      end
    end

    if (full_ripples == 0) begin
      failures++;
      $display("FAIL no vector rippled a carry through all %0d bits", W);
    end
    $display("full-length carry ripples: %0d", full_ripples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog: stimulus did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
