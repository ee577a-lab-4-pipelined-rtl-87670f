// full_adder: one-bit full adder, the FA cell of the multiplier array.
//
// s = a ^ b ^ ci, co = majority(a, b, ci). Purely combinational.
// The document draws this cell only as a symbol; the gate-level form here is
// the textbook one.
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
