// csla_cg0: carry generator for an input carry fixed at 0.
// c1_0(0) = c0(0) and, for i > 0, c1_0(i) = c0(i) OR (s0(i) AND c1_0(i-1)):
// the full-carry word the adder would produce if cin were 0. One AND-OR pair
// per bit above bit 0, rippling upward; combinational.
// Follows the optimised CG0 gate diagram, in which bit 0 needs no gate; the
// s0 input is kept N bits wide to match CG1, so lint reports s0[0] as unused.
module csla_cg0 #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] s0,
  input  logic [N-1:0] c0,
  output logic [N-1:0] c1_0
);
  assign c1_0[0] = c0[0];
  for (genvar i = 1; i < N; i++) begin : g_bit
    assign c1_0[i] = c0[i] | (s0[i] & c1_0[i-1]);
  end
endmodule
