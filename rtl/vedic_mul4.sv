// vedic_mul4: 4x4-bit unsigned Vedic multiplier.
// The operands are split into 2-bit halves and four vedic_mul2 blocks form
// the vertical and crosswise products
//   q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH   (4 bits each).
// Three 4-bit ripple carry adders then combine them:
//   RCA1: q1 + q2                        -> sum1, carry ca1
//   RCA2: sum1 + {00, q0[3:2]}           -> sum2, carry ca2
//   RCA3: q3 + {0, ca1|ca2, sum2[3:2]}   -> p[7:4]
// and p = {RCA3 sum, sum2[1:0], q0[1:0]}. Combinational.
// The four multipliers, the three 4-bit RCAs, the two zero inputs of RCA2
// and the 0/ca1/(3-2) inputs of RCA3 follow the 4x4 block diagram. The
// diagram routes only ca1 into RCA3 and leaves ca2 unconnected; that loses
// 16 whenever RCA2 overflows while RCA1 does not, so this design ORs ca2 in
// at the same weight. The two carries are never both 1 because
// q1 + q2 + q0[3:2] < 32; an assertion watches this. The final carry of RCA3
// is always 0 for a 4x4 product and is checked by a second assertion.
module vedic_mul4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;
  logic [3:0] sum1, sum2, sum3;
  logic       ca1, ca2, ca3;

  vedic_mul2 u_m0 (.a(a[1:0]), .b(b[1:0]), .p(q0));
  vedic_mul2 u_m1 (.a(a[3:2]), .b(b[1:0]), .p(q1));
  vedic_mul2 u_m2 (.a(a[1:0]), .b(b[3:2]), .p(q2));
  vedic_mul2 u_m3 (.a(a[3:2]), .b(b[3:2]), .p(q3));

  rca #(.W(4)) u_add1 (.a(q1), .b(q2), .ci(1'b0), .s(sum1), .co(ca1));
  rca #(.W(4)) u_add2 (.a(sum1), .b({2'b00, q0[3:2]}), .ci(1'b0), .s(sum2), .co(ca2));
  rca #(.W(4)) u_add3 (.a(q3), .b({1'b0, ca1 | ca2, sum2[3:2]}), .ci(1'b0),
                       .s(sum3), .co(ca3));

  assign p = {sum3, sum2[1:0], q0[1:0]};

  always_comb begin
    assert (!(ca1 && ca2)) else $error("vedic_mul4: both middle carries set");
    assert (!ca3)          else $error("vedic_mul4: final carry set");
  end
endmodule
