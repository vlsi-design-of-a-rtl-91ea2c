// mult_pkg: sizes and the carry-save reduction plan of the 16x16 pipelined
// two's-complement multiplier.
//
// The partial-product matrix has 32 columns (one per product bit). Column c
// holds min(c+1,16) partial-product bits (every partial product is sign
// extended to bit 31), plus the multiplier sign bit a15 inserted twice into
// column 13 and once into column 14, which adds the "+2^15 a15" term of the
// two's-complement identity while keeping every column at height 16.
//
// Six Wallace levels reduce the maximum height 16 -> 11 -> 8 -> 6 -> 4 -> 3 -> 2.
// In every level each column is cut into groups of three bits, each group
// feeding one full adder (sum stays in the column, carry moves one column
// up; the carry out of column 31 is dropped). The one or two bits left over
// pass through unchanged. Only where that would leave a column above the
// level's target height do the two leftover bits go through a full adder
// with its third input tied low. With this plan a half adder is needed only
// in level 6 (columns 8..14); all adders of one level work in parallel.
//
// The bits of one level are kept in one flat vector, column after column
// starting at column 0. Inside column c of the output of a level the order
// is: sums of this column's full adders, then the leftover (or the half-add
// sum), then the carries coming from column c-1. Every function below is a
// constant function evaluated while the design is elaborated.
//
// Heights, full-adder counts and latch widths follow from this rule; the
// resulting widths are 144 bits after level 3 and 57 bits after level 6.
package mult_pkg;

  localparam int N       = 16;   // operand width
  localparam int PW      = 32;   // product width
  localparam int NLEVELS = 6;    // carry-save levels
  localparam int NBLK    = 8;    // 4-bit blocks of the final adder

  typedef int col_arr_t[PW];

  // Maximum column height allowed after each level (the height sequence of
  // the level table for a 16-high matrix).
  function automatic int level_target(input int level);
    case (level)
      1: return 11;
      2: return 8;
      3: return 6;
      4: return 4;
      5: return 3;
      default: return 2;
    endcase
  endfunction

  // Column heights of the partial-product matrix (level 0).
  function automatic col_arr_t matrix_heights();
    col_arr_t h;
    for (int c = 0; c < PW; c++) h[c] = (c < N) ? c + 1 : N;
    h[13] += 2;
    h[14] += 1;
    return h;
  endfunction

  // Whether level `level` (1..6) puts a half adder in column `col`, given the
  // heights `h` entering that level.
  function automatic bit ha_rule(input col_arr_t h, input int level, input int col);
    int cin = 0;
    bit ha = 1'b0;
    for (int c = 0; c <= col; c++) begin
      int f = h[c] / 3;
      int r = h[c] % 3;
      ha = (f + r + cin > level_target(level)) && (r == 2);
      cin = f + int'(ha);
    end
    return ha;
  endfunction

  // Column heights after `level` levels (0 = the matrix itself).
  function automatic col_arr_t heights(input int level);
    col_arr_t h = matrix_heights();
    col_arr_t n;
    for (int lv = 1; lv <= level; lv++) begin
      int cin = 0;
      for (int c = 0; c < PW; c++) begin
        int  f  = h[c] / 3;
        int  r  = h[c] % 3;
        bit  ha = (f + r + cin > level_target(lv)) && (r == 2);
        n[c] = f + (ha ? 1 : r) + cin;
        cin  = f + int'(ha);
      end
      h = n;
    end
    return h;
  endfunction

  function automatic int height(input int level, input int col);
    col_arr_t h = heights(level);
    return h[col];
  endfunction

  // Full adders with three live inputs in column `col` of level `level` (1..6).
  function automatic int fa_count(input int level, input int col);
    return height(level - 1, col) / 3;
  endfunction

  function automatic int pass_count(input int level, input int col);
    return height(level - 1, col) % 3;
  endfunction

  function automatic bit ha_used(input int level, input int col);
    return ha_rule(heights(level - 1), level, col);
  endfunction

  // Index of the first bit of column `col` in the flat vector after `level`.
  function automatic int offset(input int level, input int col);
    col_arr_t h = heights(level);
    int s = 0;
    for (int c = 0; c < col; c++) s += h[c];
    return s;
  endfunction

  function automatic int total(input int level);
    return offset(level, PW);
  endfunction

  // Index, after `level`, of the first carry that column `col` receives from
  // column col-1.
  function automatic int carry_base(input int level, input int col);
    return offset(level, col) + fa_count(level, col)
         + (ha_used(level, col) ? 1 : pass_count(level, col));
  endfunction

  // Full adders of one level, counting half adders as full adders.
  function automatic int adders_in_level(input int level);
    int s = 0;
    for (int c = 0; c < PW; c++) s += fa_count(level, c) + int'(ha_used(level, c));
    return s;
  endfunction

  // Widths of the four scannable pipeline latches.
  localparam int L1_W  = total(3);               // after CSA level 3
  localparam int L2_W  = total(NLEVELS);         // the two adder operands
  localparam int NPG_G = NBLK - 1;               // G3, G7 .. G27
  localparam int NPG_P = NBLK - 2;               // P7, P11 .. P27
  localparam int L3_W  = L2_W + NPG_G + NPG_P;   // operands + block P and G
  localparam int NCARRY = NBLK - 1;              // C4, C8 .. C28
  localparam int L4_W  = L2_W + NCARRY;          // operands + block carries

endpackage
