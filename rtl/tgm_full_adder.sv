// tgm_full_adder: one-bit full adder, the cell of the multiplier's
// full-adder matrix and of its final ripple-carry adder.
//
// Function: s = a ^ b ^ ci, co = majority(a, b, ci).
// Interface: three one-bit inputs a, b, ci; outputs sum s and carry co.
// Timing: purely combinational, no clock.
//
// In the document's circuit, the matrix cells are 18-transistor
// transmission-gate full adders. Their series resistance low-pass filters
// glitches. The ripple-carry cells are static CMOS. Both kinds compute the
// same Boolean function, which is all this model gives. The filtering is an
// electrical effect with no counterpart in RTL.
module tgm_full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;  // propagate: a and b differ

  always_comb begin
    p  = a ^ b;
    s  = p ^ ci;
    co = p ? ci : a;
  end
endmodule
