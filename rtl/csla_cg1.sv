// csla_cg1: carry generator for an input carry fixed at 1.
// c1_1(0) = c0(0) OR s0(0) and, for i > 0, c1_1(i) = c0(i) OR (s0(i) AND
// c1_1(i-1)): the full-carry word the adder would produce if cin were 1.
// Combinational ripple of AND-OR pairs.
// Follows the optimised CG1 gate diagram, where bit 0 reduces to one OR gate.
module csla_cg1 #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] s0,
  input  logic [N-1:0] c0,
  output logic [N-1:0] c1_1
);
  assign c1_1[0] = c0[0] | s0[0];
  for (genvar i = 1; i < N; i++) begin : g_bit
    assign c1_1[i] = c0[i] | (s0[i] & c1_1[i-1]);
  end
endmodule
