// tgm_and_array: partial-product generator of the multiplier, one gate per
// bit pair.
//
// Row j, bit i of the output is X_i AND Y_j. It carries weight 2^(i+j), as
// in the document's sum Z = sum_j sum_i X_i Y_j 2^(i+j). With SIGNED set,
// the modified Baugh-Wooley scheme turns the array into a two's-complement
// multiplier. Each term that pairs exactly one sign bit (i = N-1 or
// j = N-1, but not both) is inverted, which makes that gate a NAND. The two
// constant ones the scheme also needs are added by the adder matrix. In the
// document's circuit these gates are level-restoring static CMOS, whose
// purely capacitive inputs decouple the multiplier from its drivers.
//
// Interface: x (multiplicand), y (multiplier) -> pp[j][i], row j from y[j].
// Timing: purely combinational.
module tgm_and_array #(
  parameter int unsigned N      = tgm_pkg::DEFAULT_WIDTH,
  parameter bit          SIGNED = 1'b1
) (
  input  logic [N-1:0]         x,
  input  logic [N-1:0]         y,
  output logic [N-1:0][N-1:0]  pp
);
  always_comb begin
    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < N; i++) begin
        if (SIGNED && ((i == N-1) != (j == N-1))) pp[j][i] = ~(x[i] & y[j]);
        else                                      pp[j][i] =   x[i] & y[j];
      end
    end
  end
endmodule
