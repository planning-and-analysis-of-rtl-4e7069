// dadda_dq42_8x8: 8x8 unsigned Dadda multiplier with dual-quality 4:2
// compressors.
//
// p = a * b when exact_mode = 1; an approximation of it when exact_mode = 0.
// The mode may change from one operation to the next: it only switches the
// compressors' output selection.
//
// Structure (combinational, three compressor delays plus one adder):
//   partial products  pp[i] = (a & {8{b[i]}}) << i, eight rows;
//   stage 1           rows 0-3 and rows 4-7 each pass through a row of
//                     4:2 compressors (comp42_row): 8 rows -> 4;
//   stage 2           one more compressor row: 4 rows -> 2;
//   final adder       an exact carry-propagate addition of the last two rows.
// The 8 -> 4 -> 2 heights are the Dadda sequence for 4:2 compressors. Which
// compressor cell sits in each column is set by VARIANT: DQ_C1..DQ_C4 use
// that variant in every fully occupied column, DQ_MIXED uses variant 1 below
// product column MIX_SPLIT and variant 4 from there up, counting columns from
// COL_OFFSET so that a sub-multiplier of a wider product can take part in the
// mixed arrangement of the whole product. Partly occupied columns at the ends
// of each compressor row are exact (see comp42_row). The placement of the
// compressors and the exact final adder are this design's own choices; the
// reduction with dual-quality 4:2 compressors follows the multiplier it
// implements.
module dadda_dq42_8x8
  import dq42_pkg::*;
#(
  parameter dq_variant_e VARIANT    = DQ_MIXED,
  parameter int          COL_OFFSET = 0,
  parameter int          MIX_SPLIT  = 8
) (
  input  logic        exact_mode,
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  localparam int N = 8;
  localparam int W = 2 * N;

  // Columns that can hold a bit of partial product i.
  function automatic logic [W-1:0] pp_mask(int i);
    return W'({N{1'b1}}) << i;
  endfunction
  // Columns an output row of a compressor row can occupy, given the union
  // of its input columns: sum reaches one column up (cin), carry two.
  function automatic logic [W-1:0] sum_mask(logic [W-1:0] occ);
    return occ | (occ << 1);
  endfunction
  function automatic logic [W-1:0] carry_mask(logic [W-1:0] occ);
    return (occ | (occ << 1)) << 1;
  endfunction

  localparam logic [W-1:0] FULL_A = pp_mask(0) & pp_mask(1) & pp_mask(2) & pp_mask(3);
  localparam logic [W-1:0] FULL_B = pp_mask(4) & pp_mask(5) & pp_mask(6) & pp_mask(7);
  localparam logic [W-1:0] OCC_A  = pp_mask(0) | pp_mask(1) | pp_mask(2) | pp_mask(3);
  localparam logic [W-1:0] OCC_B  = pp_mask(4) | pp_mask(5) | pp_mask(6) | pp_mask(7);
  localparam logic [W-1:0] FULL_2 = sum_mask(OCC_A) & carry_mask(OCC_A)
                                  & sum_mask(OCC_B) & carry_mask(OCC_B);

  logic [W-1:0] pp [N];
  always_comb begin
    for (int i = 0; i < N; i++)
      pp[i] = W'(a & {N{b[i]}}) << i;
  end

  logic [W-1:0] s_a, c_a, s_b, c_b, s_2, c_2;

  comp42_row #(.W(W), .VARIANT(VARIANT), .COL_OFFSET(COL_OFFSET),
               .MIX_SPLIT(MIX_SPLIT), .FULL_MASK(FULL_A)) u_stage1_a (
    .exact_mode(exact_mode), .r0(pp[0]), .r1(pp[1]), .r2(pp[2]), .r3(pp[3]),
    .s(s_a), .c(c_a)
  );
  comp42_row #(.W(W), .VARIANT(VARIANT), .COL_OFFSET(COL_OFFSET),
               .MIX_SPLIT(MIX_SPLIT), .FULL_MASK(FULL_B)) u_stage1_b (
    .exact_mode(exact_mode), .r0(pp[4]), .r1(pp[5]), .r2(pp[6]), .r3(pp[7]),
    .s(s_b), .c(c_b)
  );
  comp42_row #(.W(W), .VARIANT(VARIANT), .COL_OFFSET(COL_OFFSET),
               .MIX_SPLIT(MIX_SPLIT), .FULL_MASK(FULL_2)) u_stage2 (
    .exact_mode(exact_mode), .r0(s_a), .r1(c_a), .r2(s_b), .r3(c_b),
    .s(s_2), .c(c_2)
  );

  assign p = s_2 + c_2;
endmodule
