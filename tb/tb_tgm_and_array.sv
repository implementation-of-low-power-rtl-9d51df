// tb_tgm_and_array: test of the partial-product gate array.
//
// A signed (Baugh-Wooley) instance and an unsigned instance, both 16 bits,
// get the same random operands. Every one of the 256 output bits is
// compared with its definition: x[i] & y[j], inverted in the signed array
// when exactly one of i and j is the sign position 15. As a second,
// arithmetic check, the weighted sum of the signed array's bits plus
// 2^16 + 2^31 must equal the signed product modulo 2^32.
module tb_tgm_and_array;
  localparam int N = 16;

  logic [N-1:0]        x, y;
  logic [N-1:0][N-1:0] pp_s, pp_u;
  logic                clk = 1'b0;
  int                  checks = 0, failures = 0;

  tgm_and_array #(.N(N), .SIGNED(1'b1)) dut_s (.x(x), .y(y), .pp(pp_s));
  tgm_and_array #(.N(N), .SIGNED(1'b0)) dut_u (.x(x), .y(y), .pp(pp_u));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [N-1:0] a, logic [N-1:0] b);
    logic        e;
    logic [63:0] acc;
    logic [31:0] prod;
    int          bad;
    x = a; y = b;
    @(posedge clk);
    #1;
    bad = 0;
    acc = 64'(1) << N;
    acc = acc + (64'(1) << (2*N-1));
    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < N; i++) begin
        e = a[i] & b[j];
        if (pp_u[j][i] != e) bad++;
        if ((i == N-1) != (j == N-1)) e = ~e;
        if (pp_s[j][i] != e) bad++;
        if (pp_s[j][i]) acc = acc + (64'(1) << (i + j));
      end
    end
    prod = 32'($signed(a) * $signed(b));
    checks++;
    if (bad != 0) begin
      failures++;
      $display("%0d wrong partial products for %h * %h", bad, a, b);
    end
    checks++;
    if (acc[31:0] != prod) begin
      failures++;
      $display("weighted sum %h != product %h", acc[31:0], prod);
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply(16'h8000, 16'h8000);
    apply(16'h7FFF, 16'h8000);
    for (int k = 0; k < 5000; k++) apply(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
