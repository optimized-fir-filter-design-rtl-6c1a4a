// mcmat_tmult: 8x8 unsigned truncated multiplier built with the MCMAT
// (multiple-constant multiplication / accumulation with truncation) steps.
//
// p ~= (a * b) / 2^8, i.e. the upper 8 bits of the 16-bit product, computed
// without ever forming the full product:
//   1. Partial products. Row i (i = 0..7) is a & {8{b[i]}}, shifted left by
//      i. Columns are numbered 1..16 from the least significant bit.
//   2. Deletion. Row 0 is never deleted (it is kept whole for the later
//      rounding). In rows 1..7 every bit in columns 1..DEL_COL is not
//      generated at all.
//   3. Wallace tree. The remaining rows are reduced to two rows by
//      carry-save stages of FA/HA cells; a constant 1 in column 9 enters the
//      last stage (CONST_COL9).
//   4. Truncation. Columns 1..7 of both rows are dropped; in the last stage
//      they get no cells at all, and column 7 gets a carry-only HC cell.
//   5. Rounding and final CPA. The kept columns 8..16 of both rows are added
//      with a bias of 1/2 ulp (a 1 in column 8, entering as carry-in), and
//      column 8 of the result is removed. p is columns 9..16.
// The deletion limit DEL_COL = 6 and the column-9 constant reproduce the
// reference results 0xFF*0xFF -> 0xFE and 0x01*0x01 -> 0x01. Over all input
// pairs the error p - a*b/2^8 then lies in [-0.504, +1.5] ulp; with
// CONST_COL9 = 0 it lies in [-1.504, +0.5] ulp, but 0x01*0x01 gives 0x00.
// The carry-save tree shape and the cell placement are this design's own.
//
// Purely combinational. The tree is written for 8-bit operands (EWL).
module mcmat_tmult
  import mcmat_pkg::*;
#(
  parameter int unsigned DEL_COL    = 6,     // rows 1..7 lose columns 1..DEL_COL
  parameter bit          CONST_COL9 = 1'b1   // constant 1 added in column 9
) (
  input  word_t a,   // multiplicand (the coefficient in the FIR)
  input  word_t b,   // multiplier, one partial-product row per bit
  output word_t p    // truncated, rounded product: columns 9..16
);
  localparam int unsigned N  = EWL;    // 8
  localparam int unsigned PW = 2 * N;  // 16 columns

  typedef logic [PW-1:0] row_t;

  // Columns that row i can occupy after deletion (bit k is column k+1).
  function automatic row_t row_mask(int unsigned i);
    row_t m;
    for (int unsigned k = 0; k < PW; k++)
      m[k] = (k >= i) && (k < i + N) && (i == 0 || k >= DEL_COL);
    return m;
  endfunction

  localparam row_t CARRY_ZERO = row_t'(1);                  // bit 0 of a carry row
  localparam row_t CONST_ROW  = CONST_COL9 ? row_t'(1) << N : '0;

  // 1 + 2: partial products with the deleted bits left out.
  row_t [N-1:0] pp;
  always_comb begin
    for (int unsigned i = 0; i < N; i++)
      pp[i] = ((row_t'(a) & {PW{b[i]}}) << i) & row_mask(i);
  end

  // 3: Wallace tree, 8 rows -> 6 -> 4 -> 3 -> 2, then the constant row.
  row_t s0, c0, s1, c1, t0, d0, t1, d1, u0, e0, v0, f0, rs, rc;
  logic [5:0] top_carry;  // carries out of column 16; always zero since the
                          // value never reaches 2^16

  wtc_csa_row #(.W(PW), .Z_ZERO(~row_mask(2))) u_st1a (
    .x(pp[0]), .y(pp[1]), .z(pp[2]), .s(s0), .c(c0), .cout(top_carry[0]));
  wtc_csa_row #(.W(PW), .Z_ZERO(~row_mask(5))) u_st1b (
    .x(pp[3]), .y(pp[4]), .z(pp[5]), .s(s1), .c(c1), .cout(top_carry[1]));
  wtc_csa_row #(.W(PW), .Z_ZERO(CARRY_ZERO)) u_st2a (
    .x(s0), .y(s1), .z(c0), .s(t0), .c(d0), .cout(top_carry[2]));
  wtc_csa_row #(.W(PW), .Z_ZERO(~row_mask(7))) u_st2b (
    .x(c1), .y(pp[6]), .z(pp[7]), .s(t1), .c(d1), .cout(top_carry[3]));
  wtc_csa_row #(.W(PW)) u_st3 (
    .x(t0), .y(d0), .z(t1), .s(u0), .c(e0), .cout(top_carry[4]));
  wtc_csa_row #(.W(PW), .Z_ZERO(CARRY_ZERO)) u_st4 (
    .x(u0), .y(e0), .z(d1), .s(v0), .c(f0), .cout(top_carry[5]));

  // 4: last stage with the constant row; columns 1..6 need no cell, column 7
  // only its carry into column 8.
  logic unused_cout;
  wtc_csa_row #(
    .W(PW), .Z_ZERO(~CONST_ROW), .SKIP_LSBS(N - 2), .CARRY_ONLY_BITS(1)
  ) u_st5 (
    .x(v0), .y(f0), .z(CONST_ROW), .s(rs), .c(rc), .cout(unused_cout));

  // 5: final CPA over columns 8..16 with the 1/2-ulp bias as carry-in.
  logic [N+1:0] hi;
  always_comb begin
    hi = {1'b0, rs[PW-1:N-1]} + {1'b0, rc[PW-1:N-1]} + (N+2)'(1);
    p  = hi[N:1];
  end
endmodule
