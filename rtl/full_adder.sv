// full_adder: one-bit full adder used as the cell of the ripple carry adder.
// s = a ^ b ^ ci, co = majority(a, b, ci). Combinational.
// The gate form is the textbook one; the ripple adder only needs its function.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (ci & (a ^ b));
endmodule
