// wtc_fc: carry-only full adder cell (FC).
//
// Used where a full adder's sum bit would land in a column that truncation
// discards: only the carry, co = majority(a, b, ci), is produced, which saves
// the XOR gates of the sum. Purely combinational. Ports A, B, Ci in and Co out.
module wtc_fc (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic co
);
  always_comb co = (a & b) | (a & ci) | (b & ci);
endmodule
