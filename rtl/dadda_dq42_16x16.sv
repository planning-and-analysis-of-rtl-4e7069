// dadda_dq42_16x16: 16x16 unsigned multiplier assembled from four 8x8 Dadda
// DQ4:2 multipliers.
//
// With a = {ah, al} and b = {bh, bl} (8-bit halves),
//   p = al*bl + ((al*bh + ah*bl) << 8) + ((ah*bh) << 16),
// where each 8x8 product comes from a dadda_dq42_8x8 and the three terms are
// added exactly (mod 2^32). exact_mode goes to every compressor, so the
// whole multiplier switches between exact and approximate together.
// Each sub-multiplier is told its column offset inside the product
// (COL_OFFSET + 0, 8, 8, 16) so that the mixed arrangement (variant 1 below
// column MIX_SPLIT, variant 4 above) is laid over the whole product, not over
// each 8x8 block. Building the wider multiplier from 8x8 blocks follows the
// design; the exact adder that merges the four products is this design's
// choice. Combinational.
module dadda_dq42_16x16
  import dq42_pkg::*;
#(
  parameter dq_variant_e VARIANT    = DQ_MIXED,
  parameter int          COL_OFFSET = 0,
  parameter int          MIX_SPLIT  = 16
) (
  input  logic        exact_mode,
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p
);
  logic [15:0] p_ll, p_lh, p_hl, p_hh;

  dadda_dq42_8x8 #(.VARIANT(VARIANT), .COL_OFFSET(COL_OFFSET),     .MIX_SPLIT(MIX_SPLIT))
    u_ll (.exact_mode(exact_mode), .a(a[7:0]),  .b(b[7:0]),  .p(p_ll));
  dadda_dq42_8x8 #(.VARIANT(VARIANT), .COL_OFFSET(COL_OFFSET + 8), .MIX_SPLIT(MIX_SPLIT))
    u_lh (.exact_mode(exact_mode), .a(a[7:0]),  .b(b[15:8]), .p(p_lh));
  dadda_dq42_8x8 #(.VARIANT(VARIANT), .COL_OFFSET(COL_OFFSET + 8), .MIX_SPLIT(MIX_SPLIT))
    u_hl (.exact_mode(exact_mode), .a(a[15:8]), .b(b[7:0]),  .p(p_hl));
  dadda_dq42_8x8 #(.VARIANT(VARIANT), .COL_OFFSET(COL_OFFSET + 16), .MIX_SPLIT(MIX_SPLIT))
    u_hh (.exact_mode(exact_mode), .a(a[15:8]), .b(b[15:8]), .p(p_hh));

  assign p = 32'(p_ll) + (32'(p_lh) << 8) + (32'(p_hl) << 8) + (32'(p_hh) << 16);
endmodule
