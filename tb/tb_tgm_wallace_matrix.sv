// tb_tgm_wallace_matrix: test of the Wallace full-adder matrix on its own.
//
// The testbench builds the partial-product matrix itself (AND terms, with
// the Baugh-Wooley inversions in signed mode). The two output rows of the
// matrix must then add up to the product modulo 2^(2N). Three instances
// are tested:
//   - N = 16 signed and N = 16 unsigned, with corner cases and random
//     operands;
//   - N = 5 signed, with all 1024 operand pairs.
// The number of reduction stages, which is the length of the longest
// full-adder chain, is checked against the figure worked out by hand for
// a 16-row Wallace tree: 16 -> 11 -> 8 -> 6 -> 4 -> 3 -> 2 rows, which is
// 6 stages.
module tb_tgm_wallace_matrix;
  localparam int N  = 16;
  localparam int NS = 5;

  logic [N-1:0][N-1:0]   pp_s, pp_u;
  logic [2*N-1:0]        s_s, c_s, s_u, c_u;
  logic [NS-1:0][NS-1:0] pp_5;
  logic [2*NS-1:0]       s_5, c_5;
  logic                  clk = 1'b0;
  int                    checks = 0, failures = 0;

  tgm_wallace_matrix #(.N(N),  .SIGNED(1'b1)) dut_s (.pp(pp_s), .sum_row(s_s), .carry_row(c_s));
  tgm_wallace_matrix #(.N(N),  .SIGNED(1'b0)) dut_u (.pp(pp_u), .sum_row(s_u), .carry_row(c_u));
  tgm_wallace_matrix #(.N(NS), .SIGNED(1'b1)) dut_5 (.pp(pp_5), .sum_row(s_5), .carry_row(c_5));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply16(logic [N-1:0] a, logic [N-1:0] b);
    logic [2*N-1:0] ps, pu;
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++) begin
        pp_u[j][i] = a[i] & b[j];
        pp_s[j][i] = ((i == N-1) != (j == N-1)) ? ~(a[i] & b[j]) : (a[i] & b[j]);
      end
    @(posedge clk);
    #1;
    ps = (2*N)'($signed(a) * $signed(b));
    pu = (2*N)'({16'b0, a} * {16'b0, b});
    checks += 2;
    if (s_s + c_s != ps) begin
      failures++;
      if (failures < 10) $display("signed %h*%h: rows add to %h, want %h", a, b, s_s + c_s, ps);
    end
    if (s_u + c_u != pu) begin
      failures++;
      if (failures < 10) $display("unsigned %h*%h: rows add to %h, want %h", a, b, s_u + c_u, pu);
    end
  endtask

  initial begin
    logic [2*NS-1:0] p5;
    // Depth of the tree: six stages for sixteen rows.
    checks += 2;
    if (tgm_pkg::num_stages(16, 1'b1) != 6) begin
      failures++;
      $display("signed tree depth %0d", tgm_pkg::num_stages(16, 1'b1));
    end
    if (tgm_pkg::num_stages(16, 1'b0) != 6) begin
      failures++;
      $display("unsigned tree depth %0d", tgm_pkg::num_stages(16, 1'b0));
    end

    apply16('0, '0);
    apply16('1, '1);
    apply16(16'h8000, 16'h8000);
    apply16(16'h7FFF, 16'h7FFF);
    apply16(16'h8000, 16'h7FFF);
    for (int k = 0; k < 20000; k++) apply16(N'($urandom), N'($urandom));

    for (int a = 0; a < (1 << NS); a++) begin
      for (int b = 0; b < (1 << NS); b++) begin
        for (int j = 0; j < NS; j++)
          for (int i = 0; i < NS; i++)
            pp_5[j][i] = ((i == NS-1) != (j == NS-1)) ? ~(a[i] & b[j]) : (a[i] & b[j]);
        @(posedge clk);
        #1;
        p5 = (2*NS)'($signed(NS'(a)) * $signed(NS'(b)));
        checks++;
        if (s_5 + c_5 != p5) begin
          failures++;
          if (failures < 10) $display("N=5 %0d*%0d: rows add to %h, want %h", a, b, s_5 + c_5, p5);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
