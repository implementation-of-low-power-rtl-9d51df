// tg_mult: N x N low-power Wallace-tree multiplier (TG-Mult organisation).
//
// The product is formed in three layers, top to bottom:
//   1. tgm_and_array: an AND gate per bit pair (NAND on the Baugh-Wooley
//      sign terms) forms the N*N partial products.
//   2. tgm_wallace_matrix: a Wallace tree of full and half adders reduces
//      them to two rows in carry-save form.
//   3. tgm_rca: a 2N-bit ripple-carry adder adds the two rows into the
//      product.
// In the document's circuit, layers 1 and 3 are level-restoring static CMOS
// and layer 2 uses transmission-gate full adders. The transmission gates
// and the node capacitances form RC low-pass filters that absorb most
// glitches, and the circuit leaves fewer supply-to-ground paths to leak.
// These are transistor-level properties. This RTL keeps the architecture
// and the Boolean function, and synthesis maps the cells to whatever
// library it targets.
//
// Parameters: N is the operand width, 16 as in the document. SIGNED selects
// two's-complement operands (modified Baugh-Wooley, the default here). With
// SIGNED = 0 the operands are unsigned.
// Interface: x (multiplicand), y (multiplier) -> z = x * y, 2N bits.
// Timing: purely combinational, no clock and no registers. The document
// targets low-frequency use (audio, hearing aids) and reports about 72 ns of
// propagation delay at 0.75 V in 0.18 um CMOS. Any register around the
// multiplier belongs to the system that uses it.
module tg_mult #(
  parameter int unsigned N      = tgm_pkg::DEFAULT_WIDTH,
  parameter bit          SIGNED = 1'b1
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] z
);
  logic [N-1:0][N-1:0] pp;
  logic [2*N-1:0]      sum_row;
  logic [2*N-1:0]      carry_row;
  logic                rca_co;  // carry beyond 2N bits: not part of the product

  tgm_and_array #(.N(N), .SIGNED(SIGNED)) u_and_array (
    .x (x),
    .y (y),
    .pp(pp)
  );

  tgm_wallace_matrix #(.N(N), .SIGNED(SIGNED)) u_matrix (
    .pp       (pp),
    .sum_row  (sum_row),
    .carry_row(carry_row)
  );

  tgm_rca #(.W(2*N)) u_rca (
    .a (sum_row),
    .b (carry_row),
    .ci(1'b0),
    .s (z),
    .co(rca_co)
  );
endmodule
