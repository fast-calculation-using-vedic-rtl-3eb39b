// csla_hsg: half-sum generator of the modified carry select adder.
// For every bit i: s0(i) = A(i) XOR B(i) (half-sum word), c0(i) = A(i) AND B(i)
// (half-carry word). n XOR and n AND gates, combinational.
// Follows the gate-level HSG design of the modified CSLA.
module csla_hsg #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s0,
  output logic [N-1:0] c0
);
  assign s0 = a ^ b;
  assign c0 = a & b;
endmodule
