// tb_tg_mult: end-to-end test of the 16 x 16 signed multiplier at its
// default parameters.
//
// Operands are applied one pair per clock of a testbench-only clock, since
// the multiplier itself is combinational. The product is compared with a
// reference computed by the simulator's own signed multiplication. The
// stimulus covers directed corner cases (zeros, ones, -1, the most negative
// and most positive values, alternating patterns) and then a long random
// run.
//
// The test counts how often each mechanism of the design is exercised, and
// it counts a failure for any mechanism that never occurred:
//   - Baugh-Wooley sign handling: a product with one negative operand,
//     and one with two negative operands;
//   - the most negative operand squared (-2^15 * -2^15 = 2^30), which uses
//     both constant-one correction bits;
//   - a carry in the final ripple-carry adder that ripples through at
//     least 8 consecutive bit positions, found by examining the two rows
//     the Wallace matrix hands to the adder.
// Because the multiplier is combinational, its latency is zero cycles. The
// product is checked in the same cycle the operands are applied.
module tb_tg_mult;
  localparam int N = 16;

  logic [N-1:0]   x, y;
  logic [2*N-1:0] z;
  logic           clk = 1'b0;
  int             checks = 0, failures = 0, cycles = 0;
  int             n_one_neg = 0, n_two_neg = 0, n_minsq = 0, n_long_ripple = 0;

  tg_mult dut (.x(x), .y(y), .z(z));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  // Watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Longest run of bit positions a carry ripples through when adding a + b.
  function automatic int longest_ripple(logic [2*N-1:0] a, logic [2*N-1:0] b);
    int run, best;
    logic c;
    run = 0; best = 0; c = 1'b0;
    for (int i = 0; i < 2*N; i++) begin
      logic cn;
      cn = (a[i] & b[i]) | (c & (a[i] ^ b[i]));
      if (c && cn) run++;
      else if (cn) run = 1;
      else run = 0;
      if (run > best) best = run;
      c = cn;
    end
    return best;
  endfunction

  task automatic apply(logic [N-1:0] a, logic [N-1:0] b);
    logic signed [2*N-1:0] ref_p;
    x = a;
    y = b;
    @(posedge clk);
    #1;
    ref_p = $signed({{N{a[N-1]}}, a}) * $signed({{N{b[N-1]}}, b});
    checks++;
    if (z !== ref_p) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH %0d * %0d: got %0d expected %0d",
                 $signed(a), $signed(b), $signed(z), ref_p);
    end
    if (a[N-1] != b[N-1]) n_one_neg++;
    if (a[N-1] && b[N-1]) n_two_neg++;
    if (a == {1'b1, {(N-1){1'b0}}} && b == a) n_minsq++;
    if (longest_ripple(dut.sum_row, dut.carry_row) >= 8) n_long_ripple++;
  endtask

  initial begin
    logic [N-1:0] corners [8];
    int t0;
    corners[0] = '0;
    corners[1] = 16'h0001;
    corners[2] = 16'hFFFF;            // -1
    corners[3] = 16'h8000;            // most negative
    corners[4] = 16'h7FFF;            // most positive
    corners[5] = 16'hAAAA;
    corners[6] = 16'h5555;
    corners[7] = 16'h8001;
    x = '0;
    y = '0;
    t0 = cycles;
    foreach (corners[i]) foreach (corners[j]) apply(corners[i], corners[j]);
    for (int k = 0; k < 200000; k++) apply(N'($urandom), N'($urandom));

    // Combinational: exactly one cycle per operand pair.
    checks++;
    if (cycles - t0 != 64 + 200000) begin
      failures++;
      $display("cycle count %0d, expected %0d", cycles - t0, 64 + 200000);
    end

    $display("mechanisms: one_negative=%0d two_negative=%0d min_squared=%0d long_ripple=%0d",
             n_one_neg, n_two_neg, n_minsq, n_long_ripple);
    checks += 4;
    if (n_one_neg == 0)     failures++;
    if (n_two_neg == 0)     failures++;
    if (n_minsq == 0)       failures++;
    if (n_long_ripple == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
