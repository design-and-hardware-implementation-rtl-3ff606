// vedic16x16_tb: end-to-end self-checking test of the 16x16 Vedic multiplier
// at its only (full) size.
//
// Stimulus, all compared with the integer product a*b:
//   1. the nine documented example vectors, a = 0..8 with b = 65535 - a
//      (0, 65534, 131066, ... 524216) and a = 9, b = 65526 -> 589734;
//   2. corner operands (0, 1, 0x00FF, 0xFF00, 0x7FFF, 0x8000, 0xFFFF) in all
//      pairings;
//   3. complete sweeps of a over 0..65535 for SWEEP_B values of b (a slice of
//      the exhaustive 2^32 sweep), b taking 0, 1, 0xFFFF and random values;
//   4. NRAND random operand pairs.
// The test also counts how often the data-dependent situations of the adder
// tree occur, computed from the operands alone: a product above 16 bits, a
// crosswise sum aH*bL + aL*bH that carries past 16 bits, and a carry that
// ripples through at least 16 bits of the 24-bit final adder. A situation
// that never occurs counts as a failure. Ends with a TB_RESULT line; a
// watchdog ends the run with a failure if the stimulus never completes.
module vedic16x16_tb;

  localparam int unsigned SWEEP_B = 24;
  localparam int unsigned NRAND   = 400000;

  logic [15:0] a, b;
  logic [31:0] qout;

  int checks = 0;
  int failures = 0;
  int n_wide = 0;       // products wider than 16 bits
  int n_cross = 0;      // crosswise sum carries past 16 bits
  int n_long_rip = 0;   // final-adder carry chain of 16 bits or more
  int n_examples = 0;   // documented example vectors applied

  vedic16x16 dut (.a(a), .b(b), .qout(qout));

  // Longest run of carry propagation in x + y starting from a generated
  // carry, for 24-bit operands.
  function automatic int longest_ripple(input logic [23:0] x, input logic [23:0] y);
    int run = 0, best = 0;
    logic c = 1'b0;
    for (int i = 0; i < 24; i++) begin
      if (x[i] & y[i])            run = 1;
      else if (c && (x[i] ^ y[i])) run++;
      else                         run = 0;
      c = (x[i] & y[i]) | (c & (x[i] ^ y[i]));
      if (run > best) best = run;
    end
    return best;
  endfunction

  task automatic check(input logic [15:0] ta, input logic [15:0] tb_);
    logic [31:0] expected;
    logic [15:0] m1, m2, m3, m4;
    logic [23:0] s2, s1;
    a = ta; b = tb_;
    #1;
    expected = 32'(ta) * 32'(tb_);
    checks++;
    if (qout != expected) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %0d x %0d -> %0d, expected %0d", ta, tb_, qout, expected);
    end
    // situation counters, from the operands only
    m1 = 16'(ta[7:0])  * 16'(tb_[7:0]);
    m2 = 16'(ta[15:8]) * 16'(tb_[7:0]);
    m3 = 16'(ta[7:0])  * 16'(tb_[15:8]);
    m4 = 16'(ta[15:8]) * 16'(tb_[15:8]);
    if (expected[31:16] != 0) n_wide++;
    if ((17'(m2) + 17'(m3)) >= 17'h10000) n_cross++;
    s2 = {m4, 8'h00} + {8'h00, m3};
    s1 = {8'h00, m2 + {8'h00, m1[15:8]}};
    if (longest_ripple(s2, s1) >= 16) n_long_rip++;
  endtask

  localparam logic [15:0] CORNER[7] = '{
    16'h0000, 16'h0001, 16'h00FF, 16'hFF00, 16'h7FFF, 16'h8000, 16'hFFFF
  };

  initial begin
    logic [15:0] bv;
    int t0;

    for (int i = 0; i <= 8; i++) begin
      check(16'(i), 16'(65535 - i));
      n_examples++;
    end
    check(16'd9, 16'd65526);
    n_examples++;
    if (qout != 32'd589734) begin
      failures++;
      $display("FAIL example 9 x 65526 -> %0d, expected 589734", qout);
    end

    foreach (CORNER[i])
      foreach (CORNER[j]) check(CORNER[i], CORNER[j]);

    for (int s = 0; s < SWEEP_B; s++) begin
      case (s)
        0:       bv = 16'h0000;
        1:       bv = 16'h0001;
        2:       bv = 16'hFFFF;
        default: bv = 16'($urandom);
      endcase
      for (int i = 0; i < 65536; i++) check(16'(i), bv);
    end

    for (int i = 0; i < NRAND; i++) check(16'($urandom), 16'($urandom));

    $display("examples=%0d wide_products=%0d cross_carries=%0d long_ripples=%0d",
             n_examples, n_wide, n_cross, n_long_rip);
    if (n_wide == 0)     begin failures++; $display("FAIL no product above 16 bits"); end
    if (n_cross == 0)    begin failures++; $display("FAIL no crosswise carry"); end
    if (n_long_rip == 0) begin failures++; $display("FAIL no long final-adder ripple"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog: stimulus did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
