// wtc_ha: half adder cell (HA) of the Wallace tree compressor.
//
// Adds two bits of equal weight: {co, s} = a + b. Used in columns where the
// third input of a full adder is known to be zero. Purely combinational.
module wtc_ha (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
