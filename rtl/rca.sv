// rca: W-bit ripple carry adder, a chain of W full adders.
// {co, s} = a + b + ci. Combinational; delay grows linearly with W.
// The 4x4 Vedic multiplier uses three of these at W = 4, the width its block
// diagram prints. The full-adder chain is the standard ripple structure.
module rca #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W:0] c;
  assign c[0] = ci;

  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end

  assign co = c[W];
endmodule
