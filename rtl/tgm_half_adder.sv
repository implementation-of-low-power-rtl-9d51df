// tgm_half_adder: one-bit half adder, used in the Wallace matrix where a
// column leaves a pair of bits that no full adder takes.
//
// Function: s = a ^ b, co = a & b.
// Interface: two one-bit inputs a, b; outputs sum s and carry co.
// Timing: purely combinational, no clock.
//
// The document names half adders as part of the adder matrix but does not
// show their circuit. This is the plain Boolean cell.
module tgm_half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
