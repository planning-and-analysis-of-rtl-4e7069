// dq42_ref_pkg: behavioural reference model for the testbenches.
//
// Written independently of the RTL structure: compressors are described by
// their arithmetic (counts of ones) and by the output rules of each
// approximate part, and the multiplier tree is evaluated column by column on
// integer arrays. Variants are plain integers here: 1..4 = DQ4:2C1..C4,
// 5 = mixed (C1 below the split column, C4 from it up), 0 = exact cell.
package dq42_ref_pkg;

  typedef struct packed {
    bit sum;
    bit carry;
    bit cout;
  } comp_t;

  // Exact 4:2 compressor from the counts: cout takes one pair out of
  // a1+a2+a3, carry one pair out of what is left plus a4 and cin.
  function automatic comp_t comp_exact(bit a1, bit a2, bit a3, bit a4, bit cin);
    comp_t r;
    int t1, t2;
    t1 = int'(a1) + int'(a2) + int'(a3);
    r.cout  = (t1 >= 2);
    t2 = (t1 % 2) + int'(a4) + int'(cin);
    r.carry = (t2 >= 2);
    r.sum   = (t2 % 2) != 0;
    return r;
  endfunction

  // Approximate parts (cin is not used in approximate mode).
  function automatic comp_t comp_approx(int v, bit a1, bit a2, bit a3, bit a4);
    comp_t r;
    r = '0;
    case (v)
      1: begin r.sum = a1; r.carry = a4; end
      2: begin r.sum = a1; r.carry = a4; r.cout = a3; end
      3: begin r.sum = (a1 != a2) || (a3 != a4); r.carry = a4; end
      4: begin r.sum = (a1 != a2) || (a3 != a4);
               r.carry = (a1 && a2) || (a3 && a4); end
      default: ;
    endcase
    return r;
  endfunction

  function automatic comp_t comp(int v, bit exact, bit a1, bit a2, bit a3, bit a4, bit cin);
    if (v == 0 || exact) return comp_exact(a1, a2, a3, a4, cin);
    return comp_approx(v, a1, a2, a3, a4);
  endfunction

  // One compressor row over W columns. rows[k][j] is bit j of row k;
  // occ[k][j] says whether that position can hold a bit. A column gets the
  // multiplier's variant only when all four positions can hold a bit.
  function automatic void comp_row(int v, bit exact, int col_off, int split,
                                   bit rows[4][64], bit occ[4][64], int w,
                                   output bit s[64], output bit c[64]);
    bit cin;
    comp_t r;
    int vv;
    cin = 0;
    for (int j = 0; j < 64; j++) begin s[j] = 0; c[j] = 0; end
    for (int j = 0; j < w; j++) begin
      vv = 0;
      if (occ[0][j] && occ[1][j] && occ[2][j] && occ[3][j]) begin
        vv = v;
        if (v == 5) vv = (col_off + j < split) ? 1 : 4;
      end
      r = comp(vv, exact, rows[0][j], rows[1][j], rows[2][j], rows[3][j], cin);
      s[j] = r.sum;
      if (j + 1 < w) c[j+1] = r.carry;
      cin = r.cout;
    end
  endfunction

  function automatic longint unsigned bits_to_int(bit x[64], int w);
    longint unsigned r;
    r = 0;
    for (int j = 0; j < w; j++) if (x[j]) r |= (64'd1 << j);
    return r;
  endfunction

  // 8x8 multiplier: partial products, two compressor stages, exact add.
  function automatic int unsigned mul8(int v, bit exact, int col_off, int split,
                                       bit [7:0] a, bit [7:0] b);
    bit rows[4][64], occ[4][64];
    bit sa[64], ca[64], sb[64], cb[64], s2[64], c2[64];
    bit oa[64], ob[64];
    for (int g = 0; g < 2; g++) begin
      for (int k = 0; k < 4; k++)
        for (int j = 0; j < 64; j++) begin
          int i;
          i = 4*g + k;
          occ[k][j]  = (j >= i) && (j < i + 8);
          rows[k][j] = occ[k][j] ? (a[j-i] & b[i]) : 1'b0;
        end
      if (g == 0) comp_row(v, exact, col_off, split, rows, occ, 16, sa, ca);
      else        comp_row(v, exact, col_off, split, rows, occ, 16, sb, cb);
    end
    // where the stage-1 outputs can be non-zero: sum up to one column above
    // the group's last partial-product column, carry up to two above
    for (int j = 0; j < 64; j++) begin
      oa[j] = (j <= 11);        // group 0 spans columns 0..10
      ob[j] = (j >= 4);         // group 1 spans columns 4..14
    end
    for (int j = 0; j < 64; j++) begin
      rows[0][j] = sa[j]; occ[0][j] = oa[j] && (j <= 11);
      rows[1][j] = ca[j]; occ[1][j] = (j >= 1) && (j <= 12);
      rows[2][j] = sb[j]; occ[2][j] = ob[j] && (j <= 15);
      rows[3][j] = cb[j]; occ[3][j] = (j >= 5);
    end
    comp_row(v, exact, col_off, split, rows, occ, 16, s2, c2);
    return int'((bits_to_int(s2, 16) + bits_to_int(c2, 16)) & 64'hFFFF);
  endfunction

  function automatic int unsigned mul16(int v, bit exact, int col_off, int split,
                                        bit [15:0] a, bit [15:0] b);
    longint unsigned r;
    r = longint'(mul8(v, exact, col_off,      split, a[7:0],  b[7:0]))
      + (longint'(mul8(v, exact, col_off + 8,  split, a[7:0],  b[15:8])) << 8)
      + (longint'(mul8(v, exact, col_off + 8,  split, a[15:8], b[7:0]))  << 8)
      + (longint'(mul8(v, exact, col_off + 16, split, a[15:8], b[15:8])) << 16);
    return int'(r & 64'hFFFF_FFFF);
  endfunction

  function automatic longint unsigned mul32(int v, bit exact, bit [31:0] a, bit [31:0] b);
    longint unsigned r;
    r = longint'(mul16(v, exact, 0,  32, a[15:0],  b[15:0]))
      + (longint'(mul16(v, exact, 16, 32, a[15:0],  b[31:16])) << 16)
      + (longint'(mul16(v, exact, 16, 32, a[31:16], b[15:0]))  << 16)
      + (longint'(mul16(v, exact, 32, 32, a[31:16], b[31:16])) << 32);
    return r;
  endfunction

endpackage
