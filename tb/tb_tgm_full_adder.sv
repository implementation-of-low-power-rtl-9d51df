// tb_tgm_full_adder: exhaustive test of the one-bit full adder.
// All eight input combinations are applied, and {co, s} is compared with
// the arithmetic sum a + b + ci. A testbench clock paces the vectors and
// drives the watchdog.
module tb_tgm_full_adder;
  logic a, b, ci, s, co;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  tgm_full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      @(posedge clk);
      #1;
      checks++;
      if ({co, s} != 2'(32'(a) + 32'(b) + 32'(ci))) begin
        failures++;
        $display("FA %b%b%b -> co=%b s=%b", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
