// half_adder: one-bit half adder, the cell the 2x2 Vedic multiplier is built
// from. sum = a XOR b, carry = a AND b. Purely combinational, no clock.
// The use of two half adders in the 2x2 block follows the 2x2 block diagram;
// the gate realisation of the half adder itself is the textbook one.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
