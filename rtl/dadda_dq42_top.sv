// dadda_dq42_top: the five 32x32 Dadda DQ4:2 multipliers side by side.
//
// The dual-quality compressors give five 32x32 multipliers, one per
// compressor arrangement: variant 1, 2, 3 or 4 in every compressor, and the
// mixed one (variant 1 in the low 32 product columns, variant 4 in the high
// 32). All five share the operands and the run-time mode and each brings out
// its own product, so their accuracy can be compared cycle by cycle. The
// mixed multiplier is the arrangement recommended for use.
//
// Interface and timing: operands ri1, ri2 and exact_mode are registered on
// the rising edge of clk; the products are registered one edge later, so a
// result appears two cycles after its operands (one operation per cycle).
// clr is a synchronous, active-high clear of all registers. exact_mode = 1
// gives exact products from every multiplier; exact_mode = 0 selects the
// approximate mode. The operand names ri1/ri2 and the clk/clr pair follow the
// design's simulation set-up; the register stages are this design's choice.
module dadda_dq42_top
  import dq42_pkg::*;
(
  input  logic           clk,
  input  logic           clr,
  input  logic           exact_mode,
  input  logic [31:0]    ri1,
  input  logic [31:0]    ri2,
  output logic [63:0]    p_c1,
  output logic [63:0]    p_c2,
  output logic [63:0]    p_c3,
  output logic [63:0]    p_c4,
  output logic [63:0]    p_mixed
);

  logic [31:0]    a_q, b_q;
  logic           exact_q;
  logic [63:0]    m_c1, m_c2, m_c3, m_c4, m_mixed;

  always_ff @(posedge clk) begin
    if (clr) begin
      a_q     <= '0;
      b_q     <= '0;
      exact_q <= 1'b1;
    end else begin
      a_q     <= ri1;
      b_q     <= ri2;
      exact_q <= exact_mode;
    end
  end

  dadda_dq42_32x32 #(.VARIANT(DQ_C1))    u_mul_c1    (.exact_mode(exact_q), .a(a_q), .b(b_q), .p(m_c1));
  dadda_dq42_32x32 #(.VARIANT(DQ_C2))    u_mul_c2    (.exact_mode(exact_q), .a(a_q), .b(b_q), .p(m_c2));
  dadda_dq42_32x32 #(.VARIANT(DQ_C3))    u_mul_c3    (.exact_mode(exact_q), .a(a_q), .b(b_q), .p(m_c3));
  dadda_dq42_32x32 #(.VARIANT(DQ_C4))    u_mul_c4    (.exact_mode(exact_q), .a(a_q), .b(b_q), .p(m_c4));
  dadda_dq42_32x32 #(.VARIANT(DQ_MIXED)) u_mul_mixed (.exact_mode(exact_q), .a(a_q), .b(b_q), .p(m_mixed));

  always_ff @(posedge clk) begin
    if (clr) begin
      p_c1    <= '0;
      p_c2    <= '0;
      p_c3    <= '0;
      p_c4    <= '0;
      p_mixed <= '0;
    end else begin
      p_c1    <= m_c1;
      p_c2    <= m_c2;
      p_c3    <= m_c3;
      p_c4    <= m_c4;
      p_mixed <= m_mixed;
    end
  end
endmodule
