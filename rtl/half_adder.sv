// half_adder: one-bit half adder, the HA cell at the low end of each adder
// row of the multiplier array.
//
// s = a ^ b, co = a & b. Purely combinational. The document draws this cell
// only as a symbol; the gate-level form here is the textbook one.
module half_adder (
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
