// csla_cs: carry selection unit of the modified carry select adder.
// Picks the final carry word c from the two candidate words by the input
// carry. Since a carry that is 1 for cin = 0 is also 1 for cin = 1
// (c1_0(i) implies c1_1(i)), the 2:1 multiplexer per bit reduces to one
// AND-OR gate: c(i) = c1_0(i) OR (cin AND c1_1(i)). Combinational.
// Follows the CS gate diagram (n AND-OR gates). The assertion checks the
// implication the simplification depends on.
module csla_cs #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] c1_0,
  input  logic [N-1:0] c1_1,
  input  logic         cin,
  output logic [N-1:0] c
);
  assign c = c1_0 | ({N{cin}} & c1_1);

  always_comb begin
    assert ((c1_0 & ~c1_1) == '0)
      else $error("csla_cs: carry word for cin=0 not covered by cin=1 word");
  end
endmodule
