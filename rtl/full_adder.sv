// full_adder: one-bit full adder, {co, s} = a + b + ci.
// Used as the single-bit serial adder in the Montgomery multiplier (turning
// the carry-save multiplier into binary bits one per clock) and in the final
// bit-serial addition. Purely combinational.
module full_adder (
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
