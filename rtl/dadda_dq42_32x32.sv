// dadda_dq42_32x32: 32x32 unsigned multiplier assembled from four 16x16 Dadda
// DQ4:2 multipliers.
//
// With a = {ah, al} and b = {bh, bl} (16-bit halves),
//   p = al*bl + ((al*bh + ah*bl) << 16) + ((ah*bh) << 32),
// where each 16x16 product comes from a dadda_dq42_16x16 (itself four 8x8
// Dadda blocks, so sixteen 8x8 blocks in all) and the three terms are
// added exactly (mod 2^64). exact_mode goes to every compressor, so the
// whole multiplier switches between exact and approximate together.
// Each sub-multiplier is told its column offset inside the product
// (COL_OFFSET + 0, 16, 16, 32) so that the mixed arrangement (variant 1 below
// column MIX_SPLIT, variant 4 above) is laid over the whole product, not over
// each 16x16 block. Building the wider multiplier from 16x16 blocks follows the
// design; the exact adder that merges the four products is this design's
// choice. Combinational.
module dadda_dq42_32x32
  import dq42_pkg::*;
#(
  parameter dq_variant_e VARIANT    = DQ_MIXED,
  parameter int          COL_OFFSET = 0,
  parameter int          MIX_SPLIT  = 32
) (
  input  logic        exact_mode,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [63:0] p
);
  logic [31:0] p_ll, p_lh, p_hl, p_hh;

  dadda_dq42_16x16 #(.VARIANT(VARIANT), .COL_OFFSET(COL_OFFSET),      .MIX_SPLIT(MIX_SPLIT))
    u_ll (.exact_mode(exact_mode), .a(a[15:0]),  .b(b[15:0]),  .p(p_ll));
  dadda_dq42_16x16 #(.VARIANT(VARIANT), .COL_OFFSET(COL_OFFSET + 16), .MIX_SPLIT(MIX_SPLIT))
    u_lh (.exact_mode(exact_mode), .a(a[15:0]),  .b(b[31:16]), .p(p_lh));
  dadda_dq42_16x16 #(.VARIANT(VARIANT), .COL_OFFSET(COL_OFFSET + 16), .MIX_SPLIT(MIX_SPLIT))
    u_hl (.exact_mode(exact_mode), .a(a[31:16]), .b(b[15:0]),  .p(p_hl));
  dadda_dq42_16x16 #(.VARIANT(VARIANT), .COL_OFFSET(COL_OFFSET + 32), .MIX_SPLIT(MIX_SPLIT))
    u_hh (.exact_mode(exact_mode), .a(a[31:16]), .b(b[31:16]), .p(p_hh));

  assign p = 64'(p_ll) + (64'(p_lh) << 16) + (64'(p_hl) << 16) + (64'(p_hh) << 32);
endmodule
