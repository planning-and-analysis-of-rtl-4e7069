// dq42_pkg: types shared by the dual-quality 4:2 compressor multipliers.
//
// A dual-quality 4:2 compressor (DQ4:2C) has an exact mode and an approximate
// mode, chosen at run time by one exact-mode signal. Four variants exist
// (C1..C4); they differ only in how their approximate part approximates the
// compressor. A multiplier built from them picks one variant for all of its
// compressors, or the mixed arrangement: variant 1 in the low half of the
// product columns and variant 4 in the high half.
//
// DQ_EXACT is not a proposed compressor. The multipliers use it where a
// compressor column is only partly filled with partial-product bits (the ends
// of each compressor row), so that those cells always add exactly; this is a
// choice of this implementation.
package dq42_pkg;

  typedef enum logic [2:0] {
    DQ_C1    = 3'd0,
    DQ_C2    = 3'd1,
    DQ_C3    = 3'd2,
    DQ_C4    = 3'd3,
    DQ_MIXED = 3'd4,
    DQ_EXACT = 3'd5
  } dq_variant_e;

  // Variant of the compressor at product column COL of a multiplier built
  // with VARIANT. COL is the column in the outermost product; the mixed
  // arrangement switches from C1 to C4 at column MIX_SPLIT.
  function automatic dq_variant_e column_variant(dq_variant_e variant, int col, int mix_split);
    if (variant == DQ_MIXED) return (col < mix_split) ? DQ_C1 : DQ_C4;
    return variant;
  endfunction

endpackage
