// bitslice_pkg: constants and elaboration-time helpers shared by the
// slice-based multiplier. Operands are cut into 4-bit slices; every pair of
// slices is multiplied by a 4x4 Wallace multiplier into an 8-bit partial
// product, and partial products of equal weight (one "column") are summed by a
// chain of Kogge-Stone adders. The slice width of 4 is fixed by the design;
// the helper below gives the adder width a column chain needs so that the
// modules can reject a width that would overflow.
package bitslice_pkg;

  localparam int unsigned SLICE_W = 4;            // bits per operand slice
  localparam int unsigned PP_W    = 2 * SLICE_W;  // bits per slice product
  localparam int unsigned PP_MAX  = (2 ** SLICE_W - 1) * (2 ** SLICE_W - 1);

  // Number of slice products of weight 16^k for an operand of `slices` slices.
  function automatic int unsigned col_terms(int unsigned slices, int unsigned k);
    int unsigned lo = (k + 1 < slices) ? k + 1 : slices;
    int unsigned hi = 2 * slices - 1 - k;
    return (lo < hi) ? lo : hi;
  endfunction

  // Bits needed by the largest column sum, carry from the column below
  // included: S_k = terms_k * 225 + floor(S_{k-1} / 16).
  function automatic int unsigned col_sum_width(int unsigned slices);
    longint unsigned s    = 0;
    longint unsigned smax = 0;
    for (int unsigned k = 0; k < 2 * slices - 1; k++) begin
      s = longint'(col_terms(slices, k)) * PP_MAX + (s >> SLICE_W);
      if (s > smax) smax = s;
    end
    return $clog2(smax + 1);
  endfunction

endpackage
