// mcsla: N-bit modified carry select adder built from a logic formulation
// that removes the redundant work of a conventional CSLA. {cout, s} = a + b + cin.
// Instead of two complete ripple adders and a sum multiplexer, it computes
// the half-sum and half-carry words once (HSG), derives the two candidate
// carry words for cin = 0 and cin = 1 from them (CG0, CG1), selects the
// carry word with the real input carry (CS) before any sum bit is formed,
// and only then XORs the half sum with the selected carries (FSG). The
// carry selection is thus scheduled ahead of the final addition.
//   cout = c(N-1); s = s0 XOR {c[N-2:0], cin}.
// Combinational. The unit split and the equations follow the proposed CSLA
// structure; N defaults to 16, the width used in the 16x16 multiplier
// (the 8x8 multiplier instantiates it with N = 8).
module mcsla #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N-1:0] s0, c0, c1_0, c1_1, c;

  csla_hsg #(.N(N)) u_hsg (.a(a), .b(b), .s0(s0), .c0(c0));
  csla_cg0 #(.N(N)) u_cg0 (.s0(s0), .c0(c0), .c1_0(c1_0));
  csla_cg1 #(.N(N)) u_cg1 (.s0(s0), .c0(c0), .c1_1(c1_1));
  csla_cs  #(.N(N)) u_cs  (.c1_0(c1_0), .c1_1(c1_1), .cin(cin), .c(c));
  csla_fsg #(.N(N)) u_fsg (.s0(s0), .c(c[N-2:0]), .cin(cin), .s(s));

  assign cout = c[N-1];
endmodule
