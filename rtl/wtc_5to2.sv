// wtc_5to2: 5:2 Wallace tree compressor.
//
// Reduces five W-bit operands to two rows, sum and carry, whose modulo-2^W sum
// equals the modulo-2^W sum of the five operands:
//   (op[0] + op[1] + op[2] + op[3] + op[4]) mod 2^W == (sum + carry) mod 2^W
// A final carry-propagate adder outside this block adds the two rows.
//
// Structure (three carry-save stages of FA/HA cells, this design's choice):
//   stage 1: op0 + op1 + op2        -> s1, c1
//   stage 2: s1  + c1  + op3        -> s2, c2   (c1[0] == 0: HA in bit 0)
//   stage 3: s2  + c2  + op4        -> sum, carry (c2[0] == 0: HA in bit 0)
// Carries out of bit W-1 are dropped, so the result wraps modulo 2^W.
// Purely combinational: three full-adder delays from any input to the rows.
module wtc_5to2 #(
  parameter int unsigned W = 8
) (
  input  logic [4:0][W-1:0] op,
  output logic [W-1:0]      sum,
  output logic [W-1:0]      carry
);
  localparam logic [W-1:0] BIT0 = W'(1);

  logic [W-1:0] s1, c1, s2, c2;
  logic [2:0]   dropped;  // carries out of the top bit, discarded (mod 2^W)

  wtc_csa_row #(.W(W)) u_st1 (
    .x(op[0]), .y(op[1]), .z(op[2]), .s(s1), .c(c1), .cout(dropped[0])
  );
  // c1[0] is zero, so it is passed on the z input of the bit-0 half adder.
  wtc_csa_row #(.W(W), .Z_ZERO(BIT0)) u_st2 (
    .x(s1), .y(op[3]), .z(c1), .s(s2), .c(c2), .cout(dropped[1])
  );
  wtc_csa_row #(.W(W), .Z_ZERO(BIT0)) u_st3 (
    .x(s2), .y(op[4]), .z(c2), .s(sum), .c(carry), .cout(dropped[2])
  );
endmodule
