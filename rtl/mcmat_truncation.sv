// mcmat_truncation: sum of five MCMAT truncated products.
//
//   result = ( T(a,b) + T(cf,d) + T(e,f) + T(g,h) + T(k,l) ) mod 2^8
// where T is the 8x8 truncated multiplier (mcmat_tmult): each product is
// truncated and rounded to 8 bits on its own, as the reference results show
// (every 0xFF*0xFF product gives 0xFE and the total 5*0xFE wraps to 0xF6).
// The five truncated products are reduced to two rows by the 5:2 Wallace tree
// compressor (wtc_5to2) and added by a final carry-propagate adder; the sum is
// kept to the 8-bit word length and wraps on overflow.
//
// The operand names follow the reference simulation (a,b  cf,d  e,f  g,h
// k,l); the first of each pair is the multiplicand. The individual truncated
// products are also brought out, as o, o0, o1, o2, o3.
// Purely combinational.
module mcmat_truncation
  import mcmat_pkg::*;
(
  input  word_t a, b, cf, d, e, f, g, h, k, l,
  output word_t o, o0, o1, o2, o3,
  output word_t result
);
  logic [4:0][EWL-1:0] prod;
  word_t               row_s, row_c;

  mcmat_tmult u_m0 (.a(a),  .b(b), .p(prod[0]));
  mcmat_tmult u_m1 (.a(cf), .b(d), .p(prod[1]));
  mcmat_tmult u_m2 (.a(e),  .b(f), .p(prod[2]));
  mcmat_tmult u_m3 (.a(g),  .b(h), .p(prod[3]));
  mcmat_tmult u_m4 (.a(k),  .b(l), .p(prod[4]));

  wtc_5to2 #(.W(EWL)) u_wtc (.op(prod), .sum(row_s), .carry(row_c));

  always_comb begin
    o      = prod[0];
    o0     = prod[1];
    o1     = prod[2];
    o2     = prod[3];
    o3     = prod[4];
    result = row_s + row_c;   // final CPA, modulo 2^8
  end
endmodule
