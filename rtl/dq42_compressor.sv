// dq42_compressor: one 4:2 compressor cell of a chosen variant.
//
// Selects at elaboration time which compressor sits in a multiplier column:
// one of the dual-quality variants dq42_c1..dq42_c4, or the plain exact
// compressor (DQ_EXACT), which ignores exact_mode. DQ_MIXED is resolved by
// the caller (dq42_pkg::column_variant) and is not accepted here. Ports and
// timing are those of the selected cell: purely combinational.
module dq42_compressor
  import dq42_pkg::*;
#(
  parameter dq_variant_e VARIANT = DQ_C1
) (
  input  logic exact_mode,
  input  logic a1,
  input  logic a2,
  input  logic a3,
  input  logic a4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  if (VARIANT == DQ_C1) begin : g_c1
    dq42_c1 u_c (.*);
  end else if (VARIANT == DQ_C2) begin : g_c2
    dq42_c2 u_c (.*);
  end else if (VARIANT == DQ_C3) begin : g_c3
    dq42_c3 u_c (.*);
  end else if (VARIANT == DQ_C4) begin : g_c4
    dq42_c4 u_c (.*);
  end else begin : g_exact
    // DQ_EXACT (DQ_MIXED must have been resolved per column before this)
    exact_42_compressor u_c (
      .a1(a1), .a2(a2), .a3(a3), .a4(a4), .cin(cin),
      .sum(sum), .carry(carry), .cout(cout)
    );
    logic unused_mode;
    assign unused_mode = exact_mode;
  end
endmodule
