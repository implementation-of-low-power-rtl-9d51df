// tb_tgm_half_adder: exhaustive test of the one-bit half adder.
// All four input combinations are applied, and {co, s} is compared with the
// arithmetic sum a + b.
module tb_tgm_half_adder;
  logic a, b, s, co;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  tgm_half_adder dut (.a(a), .b(b), .s(s), .co(co));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      @(posedge clk);
      #1;
      checks++;
      if ({co, s} != 2'(32'(a) + 32'(b))) begin
        failures++;
        $display("HA %b%b -> co=%b s=%b", a, b, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
