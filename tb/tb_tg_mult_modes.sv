// tb_tg_mult_modes: test of the multiplier in both signedness modes and at
// several operand widths.
//
// - N = 16 unsigned (SIGNED = 0), the plain sum of AND terms: random and
//   corner operands, against the simulator's unsigned product.
// - N = 6 and N = 8, signed and unsigned: every operand pair, which
//   shows the generated Wallace schedule is correct for widths other than
//   16.
// One operand pair is applied per testbench clock. All instances are
// combinational, so each product is checked in the cycle its operands are
// applied.
module tb_tg_mult_modes;
  logic        clk = 1'b0;
  int          checks = 0, failures = 0;

  logic [15:0] x16, y16;
  logic [31:0] z16u;
  logic [7:0]  x8, y8;
  logic [15:0] z8s, z8u;
  logic [5:0]  x6, y6;
  logic [11:0] z6s, z6u;

  tg_mult #(.N(16), .SIGNED(1'b0)) dut16u (.x(x16), .y(y16), .z(z16u));
  tg_mult #(.N(8),  .SIGNED(1'b1)) dut8s  (.x(x8),  .y(y8),  .z(z8s));
  tg_mult #(.N(8),  .SIGNED(1'b0)) dut8u  (.x(x8),  .y(y8),  .z(z8u));
  tg_mult #(.N(6),  .SIGNED(1'b1)) dut6s  (.x(x6),  .y(y6),  .z(z6s));
  tg_mult #(.N(6),  .SIGNED(1'b0)) dut6u  (.x(x6),  .y(y6),  .z(z6u));

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("%s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    x16 = '0; y16 = '0; x8 = '0; y8 = '0; x6 = '0; y6 = '0;

    // 8-bit and 6-bit, exhaustive (6-bit pairs repeat inside the 8-bit sweep)
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        x8 = 8'(a); y8 = 8'(b);
        x6 = 6'(a); y6 = 6'(b);
        x16 = 16'($urandom); y16 = 16'($urandom);
        if (a == 0 && b < 4) begin
          x16 = (b[0]) ? 16'hFFFF : 16'h0000;
          y16 = (b[1]) ? 16'hFFFF : 16'h8000;
        end
        @(posedge clk);
        #1;
        check("8s", longint'($signed(z8s)), longint'($signed(x8)) * longint'($signed(y8)));
        check("8u", longint'(z8u), longint'(x8) * longint'(y8));
        if (a < 64 && b < 64) begin
          check("6s", longint'($signed(z6s)), longint'($signed(x6)) * longint'($signed(y6)));
          check("6u", longint'(z6u), longint'(x6) * longint'(y6));
        end
        check("16u", longint'(z16u), longint'(x16) * longint'(y16));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
