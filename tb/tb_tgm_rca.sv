// tb_tgm_rca: test of the ripple-carry adder at the multiplier's width of
// 32 bits. Each case compares {co, s} with the 33-bit sum a + b + ci. The
// cases include carries that ripple the full length (all-ones plus one) and
// random operands with both values of the carry in.
module tb_tgm_rca;
  localparam int W = 32;

  logic [W-1:0] a, b, s;
  logic         ci, co;
  logic         clk = 1'b0;
  int           checks = 0, failures = 0;

  tgm_rca #(.W(W)) dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [W-1:0] ta, logic [W-1:0] tb_, logic tc);
    logic [W:0] expect_sum;
    a = ta; b = tb_; ci = tc;
    @(posedge clk);
    #1;
    expect_sum = {1'b0, ta} + {1'b0, tb_} + {{W{1'b0}}, tc};
    checks++;
    if ({co, s} != expect_sum) begin
      failures++;
      if (failures < 10) $display("RCA %h + %h + %b -> %h%h", ta, tb_, tc, co, s);
    end
  endtask

  initial begin
    apply('1, '0, 1'b1);             // carry through all 32 cells
    apply('1, 32'd1, 1'b0);
    apply('1, '1, 1'b1);
    apply('0, '0, 1'b0);
    apply(32'h5555_5555, 32'hAAAA_AAAA, 1'b1);
    for (int k = 0; k < 20000; k++) apply($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
