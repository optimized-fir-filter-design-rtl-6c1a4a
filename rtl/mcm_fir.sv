// mcm_fir: 5-tap direct-form low-pass FIR filter whose coefficient products
// are MCMAT truncated multipliers summed by a 5:2 Wallace tree compressor.
//
//   y_n = ( T(h0,x[n]) + T(h1,x[n-1]) + T(h2,x[n-2]) + T(h3,x[n-3])
//         + T(h4,x[n-4]) ) mod 2^8
// T is the 8x8 truncated multiplier (upper 8 product bits, rounded), so the
// coefficients read as fractions of 256 and the output has the 8-bit word
// length of the input. The delay line xn_d1..xn_d4 is four 8-bit registers
// that shift on every rising clock edge; the products and their sum are
// combinational, so y_n follows xn within the same cycle and an impulse on xn
// walks through the taps one cycle per tap.
//
// Interface: clk, rst_n (asynchronous, active low, clears the delay line),
// xn (sample, unsigned 8-bit), y_n (filter output, unsigned 8-bit, wraps on
// overflow), xn_d1..xn_d4 (the delay-line registers, x[n-1]..x[n-4], brought
// out for observation). Taps, word length and the truncated arithmetic follow the filter
// specification; the coefficient values (COEFFS), the reset and the
// unsigned sample format are this design's choices.
module mcm_fir
  import mcmat_pkg::*;
#(
  parameter taps_t COEFFS = DEFAULT_COEFFS   // element k is h(k)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  word_t xn,
  output word_t y_n,
  output word_t xn_d1,
  output word_t xn_d2,
  output word_t xn_d3,
  output word_t xn_d4
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xn_d1 <= '0;
      xn_d2 <= '0;
      xn_d3 <= '0;
      xn_d4 <= '0;
    end else begin
      xn_d1 <= xn;
      xn_d2 <= xn_d1;
      xn_d3 <= xn_d2;
      xn_d4 <= xn_d3;
    end
  end

  // The individual truncated products are not needed outside.
  word_t unused_o, unused_o0, unused_o1, unused_o2, unused_o3;

  mcmat_truncation u_mcmat (
    .a (COEFFS[0]), .b(xn),
    .cf(COEFFS[1]), .d(xn_d1),
    .e (COEFFS[2]), .f(xn_d2),
    .g (COEFFS[3]), .h(xn_d3),
    .k (COEFFS[4]), .l(xn_d4),
    .o(unused_o), .o0(unused_o0), .o1(unused_o1), .o2(unused_o2), .o3(unused_o3),
    .result(y_n)
  );
endmodule
