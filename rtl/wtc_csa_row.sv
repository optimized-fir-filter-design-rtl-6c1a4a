// wtc_csa_row: one carry-save (3:2) stage of a Wallace tree, W bits wide.
//
// Each bit position i holds one adder cell that adds x[i], y[i] and z[i] and
// returns a sum bit s[i] and a carry bit c[i+1]; c[0] is zero and the carry of
// the top bit leaves on cout. So x + y + z == s + c + (cout << W).
//
// The cell in each position is chosen at elaboration time:
//   i <  SKIP_LSBS                     no cell, s[i] = c[i+1] = 0 (the column
//                                      and its carry are truncated anyway)
//   i <  SKIP_LSBS + CARRY_ONLY_BITS   carry-only cell, s[i] = 0:
//                                      HC if Z_ZERO[i], else FC
//   otherwise                          HA if Z_ZERO[i], else FA
// Z_ZERO marks the positions where the caller guarantees z[i] == 0 (for
// example bit 0 of a carry row, or a constant row); z is ignored there.
// Purely combinational.
module wtc_csa_row #(
  parameter int unsigned W               = 8,
  parameter logic [W-1:0] Z_ZERO         = '0,
  parameter int unsigned SKIP_LSBS       = 0,
  parameter int unsigned CARRY_ONLY_BITS = 0
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c,
  output logic         cout
);
  logic [W:0] carry;

  assign carry[0] = 1'b0;
  assign c        = carry[W-1:0];
  assign cout     = carry[W];

  for (genvar i = 0; i < W; i++) begin : g_bit
    if (i < SKIP_LSBS) begin : g_none
      assign s[i]       = 1'b0;
      assign carry[i+1] = 1'b0;
    end else if (i < SKIP_LSBS + CARRY_ONLY_BITS) begin : g_carry_only
      assign s[i] = 1'b0;
      if (Z_ZERO[i]) begin : g_hc
        wtc_hc u_hc (.a(x[i]), .b(y[i]), .co(carry[i+1]));
      end else begin : g_fc
        wtc_fc u_fc (.a(x[i]), .b(y[i]), .ci(z[i]), .co(carry[i+1]));
      end
    end else begin : g_full
      if (Z_ZERO[i]) begin : g_ha
        wtc_ha u_ha (.a(x[i]), .b(y[i]), .s(s[i]), .co(carry[i+1]));
      end else begin : g_fa
        wtc_fa u_fa (.a(x[i]), .b(y[i]), .ci(z[i]), .s(s[i]), .co(carry[i+1]));
      end
    end
  end
endmodule
