// wtc_hc: carry-only half adder cell (HC).
//
// Used where a half adder's sum bit would land in a column that truncation
// discards: only the carry of the two input bits, co = a & b, is produced.
// Purely combinational. Ports A, B in and Co out.
module wtc_hc (
  input  logic a,
  input  logic b,
  output logic co
);
  always_comb co = a & b;
endmodule
