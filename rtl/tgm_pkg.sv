// tgm_pkg: shared constants and elaboration-time helper functions of the
// transmission-gate Wallace multiplier.
//
// The Wallace full-adder matrix is generated from a column-height schedule,
// which these constant functions compute while the design elaborates, so any
// operand width gives a correct tree. Each column of the partial-product
// matrix is reduced on its own. In one stage, every complete group of three
// bits goes into a full adder and a leftover pair goes into a half adder. A
// single leftover bit passes straight through. The sums stay in their
// column; the carries move one column to the left. Stages repeat until no
// column holds more than two bits. The two remaining rows go to the final
// ripple-carry adder.
//
// Signed operands use the modified Baugh-Wooley scheme. The partial products
// that combine one sign bit with a non-sign bit are inverted. A constant one
// is added in column N and another in column 2N-1. The product is then
// correct modulo 2^(2N). The signed schedule counts both constant ones as
// extra matrix bits.
//
// The 16-bit width follows the document. The per-column grouping rule and
// the bit order inside a column are this design's own choices.
package tgm_pkg;

  // Operand width of the multiplier described by the document.
  localparam int unsigned DEFAULT_WIDTH = 16;

  // Largest operand width the schedule functions support (columns <= 128).
  localparam int unsigned MAX_WIDTH = 64;

  // Height of column c of the initial partial-product matrix.
  function automatic int init_height(int n, bit sgn, int c);
    int h;
    h = 0;
    if (c >= 0 && c <= 2*n-2) begin
      h = (c < n) ? c + 1 : 2*n - 1 - c;
    end
    if (sgn && (c == n || c == 2*n-1)) h = h + 1;
    return h;
  endfunction

  // Bits per column after s reduction stages, indexed by column.
  function automatic int height(int n, bit sgn, int s, int c);
    int h  [0:2*MAX_WIDTH-1];
    int hn [0:2*MAX_WIDTH-1];
    int cin;
    for (int k = 0; k < 2*n; k++) h[k] = init_height(n, sgn, k);
    for (int t = 0; t < s; t++) begin
      for (int k = 0; k < 2*n; k++) begin
        // carries arriving from column k-1
        cin = (k == 0) ? 0 : (h[k-1] / 3) + ((h[k-1] % 3 == 2) ? 1 : 0);
        hn[k] = (h[k] / 3) + ((h[k] % 3 != 0) ? 1 : 0) + cin;
      end
      for (int k = 0; k < 2*n; k++) h[k] = hn[k];
    end
    return h[c];
  endfunction

  // Number of reduction stages until every column holds at most two bits.
  function automatic int num_stages(int n, bit sgn);
    int s;
    bit done;
    s = 0;
    done = 1'b0;
    while (!done) begin
      done = 1'b1;
      for (int k = 0; k < 2*n; k++) begin
        if (height(n, sgn, s, k) > 2) done = 1'b0;
      end
      if (!done) s = s + 1;
    end
    return s;
  endfunction

  // Full adders in column c at stage s.
  function automatic int n_fa(int n, bit sgn, int s, int c);
    return height(n, sgn, s, c) / 3;
  endfunction

  // Half adders (0 or 1) in column c at stage s.
  function automatic int n_ha(int n, bit sgn, int s, int c);
    return (height(n, sgn, s, c) % 3 == 2) ? 1 : 0;
  endfunction

  // Pass-through bits (0 or 1) in column c at stage s.
  function automatic int n_pass(int n, bit sgn, int s, int c);
    return (height(n, sgn, s, c) % 3 == 1) ? 1 : 0;
  endfunction

  // Adder cells (full plus half) used by the whole matrix.
  function automatic int total_cells(int n, bit sgn, bit count_full);
    int acc;
    acc = 0;
    for (int s = 0; s < num_stages(n, sgn); s++) begin
      for (int k = 0; k < 2*n; k++) begin
        acc = acc + (count_full ? n_fa(n, sgn, s, k) : n_ha(n, sgn, s, k));
      end
    end
    return acc;
  endfunction

endpackage
