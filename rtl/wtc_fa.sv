// wtc_fa: full adder cell (FA) of the Wallace tree compressor.
//
// Adds three bits of equal weight and returns a sum bit of the same weight and
// a carry bit of twice the weight: {co, s} = a + b + ci. Purely combinational.
// The cell and its port set (A, B, Ci in; S, Co out) are the ones used in the
// reduction trees of the truncated multiplier.
module wtc_fa (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule
