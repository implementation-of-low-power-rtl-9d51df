// tgm_rca: W-bit ripple-carry adder, the final adder of the multiplier.
//
// It is a chain of W full-adder cells. Bit i takes a[i], b[i] and the carry
// out of bit i-1, and the carry ripples from the least to the most
// significant bit. The document picks a ripple-carry final adder for every
// architecture it compares, trading speed for energy. Its cells are
// level-restoring static CMOS, so the product outputs keep full drive.
//
// Interface: a, b (W bits), ci (carry in) -> s (W bits), co (carry out).
// Timing: purely combinational. The worst path runs through all W cells.
module tgm_rca #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W:0] c;  // c[i] is the carry into bit i

  assign c[0] = ci;

  for (genvar i = 0; i < W; i++) begin : g_bit
    tgm_full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(c[i]),
      .s (s[i]),
      .co(c[i+1])
    );
  end

  assign co = c[W];
endmodule
