// tb_tg_mult_activity: functional switching activity of the full-adder
// matrix.
//
// The switching-activity figures for these multipliers split the total
// activity of the adder outputs into a functional part alpha_F and a
// spurious (glitch) part alpha_S. alpha_F is found in a zero-delay
// simulation, where no glitch can occur. This RTL simulation is such a
// zero-delay simulation. The testbench applies a stream of uniformly
// random 16-bit signed operands, one pair per clock, to the default
// multiplier. At every vector it counts how many sum and carry outputs of
// the matrix's full and half adders changed value. alpha_F is the average
// number of transitions per adder output per operand pair.
//
// Checks: every product against the simulator's signed product; the
// number of adder outputs observed, against the cell count from the
// schedule in tgm_pkg; and alpha_F inside 0.30..0.50. That band brackets
// the functional activities of 0.40 to 0.42 reported for Wallace and
// array multipliers of this size. For a rough independent estimate,
// AND terms of random bits toggle with probability 0.375 and XOR sums
// with 0.5, so the average must fall between those two values.
module tb_tg_mult_activity;
  import tgm_pkg::*;

  localparam int N       = 16;
  localparam int NST     = num_stages(N, 1'b1);
  localparam int VECTORS = 20000;

  logic [N-1:0]   x, y;
  logic [2*N-1:0] z;
  logic           clk = 1'b0;
  logic           counting = 1'b0;
  int             checks = 0, failures = 0;
  longint         toggles = 0;
  int             outputs = 0;

  tg_mult dut (.x(x), .y(y), .z(z));

  always #5 clk = ~clk;

  initial begin
    repeat (VECTORS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Toggle counters on every full- and half-adder output of the matrix.
  for (genvar s = 0; s < NST; s++) begin : g_s
    for (genvar c = 0; c < 2*N; c++) begin : g_c
      localparam int K = n_fa(N, 1'b1, s, c) + n_ha(N, 1'b1, s, c);
      if (K > 0) begin : g_k
        logic [K-1:0] prev_s, prev_c, now_s, now_c;
        initial outputs += 2 * K;
        assign now_s = dut.u_matrix.g_stage[s].nxt[c][K-1:0];
        assign now_c = dut.u_matrix.g_stage[s].cy[c][K-1:0];
        always @(negedge clk) begin
          if (counting) toggles += $countones(now_s ^ prev_s) + $countones(now_c ^ prev_c);
          prev_s <= now_s;
          prev_c <= now_c;
        end
      end
    end
  end

  initial begin
    real alpha_f;
    x = '0;
    y = '0;
    @(posedge clk);
    @(negedge clk);
    counting = 1'b1;
    for (int k = 0; k < VECTORS; k++) begin
      @(posedge clk);
      x = N'($urandom);
      y = N'($urandom);
      @(negedge clk);
      checks++;
      if ($signed(z) != $signed(x) * $signed(y)) begin
        failures++;
        if (failures < 10) $display("product mismatch for %h * %h", x, y);
      end
    end
    @(posedge clk);

    checks++;
    if (outputs != 2 * (total_cells(N, 1'b1, 1'b1) + total_cells(N, 1'b1, 1'b0))) begin
      failures++;
      $display("observed %0d adder outputs", outputs);
    end
    alpha_f = real'(toggles) / (real'(outputs) * real'(VECTORS));
    $display("full adders %0d, half adders %0d, stages %0d",
             total_cells(N, 1'b1, 1'b1), total_cells(N, 1'b1, 1'b0), NST);
    $display("functional activity alpha_F = %0.3f transitions per output per operation", alpha_f);
    checks++;
    if (alpha_f < 0.30 || alpha_f > 0.50) begin
      failures++;
      $display("alpha_F outside 0.30..0.50");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
