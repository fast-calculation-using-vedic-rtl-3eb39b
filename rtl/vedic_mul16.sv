// vedic_mul16: 16x16-bit unsigned Vedic multiplier, p = a * b.
// The operands are split into 8-bit halves and four vedic_mul8 blocks form
// the Urdhva-Tiryakbhyam vertical and crosswise products
//   q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH   (16 bits each),
// all in parallel. Three 16-bit modified carry select adders (mcsla) then
// combine them:
//   ADD1: q1 + q2                          -> sum1, carry ca1
//   ADD2: sum1 + {8'b0, q0[15:8]}            -> sum2, carry ca2
//   ADD3: q3 + {7'b0, ca1|ca2, sum2[15:8]}  -> p[31:16]
// and p = {ADD3 sum, sum2[7:0], q0[7:0]}. Every adder's input carry is 0.
// Combinational; no clock or handshake.
// The four sub-multipliers, the three 16-bit modified CSLAs, the zero fill of
// ADD2 and the zeros/ca1/upper-half inputs of ADD3 follow the 16x16 block
// diagram. The diagram feeds only ca1 into ADD3 and leaves ca2 unused; that
// drops 2^16 of the product whenever ADD2 overflows while ADD1 does not, so
// this design ORs ca2 in at the same weight. The two carries are never both
// 1 (q1 + q2 + q0[15:8] < 2^17), which an assertion watches; a
// second assertion checks that the final carry of ADD3 stays 0.
module vedic_mul16 (
  input  logic [15:0]  a,
  input  logic [15:0]  b,
  output logic [31:0] p
);
  localparam int unsigned H = 8;

  logic [15:0] q0, q1, q2, q3;
  logic [15:0] sum1, sum2, sum3;
  logic        ca1, ca2, ca3;

  vedic_mul8 u_m0 (.a(a[H-1:0]),   .b(b[H-1:0]),   .p(q0));
  vedic_mul8 u_m1 (.a(a[15:H]), .b(b[H-1:0]),   .p(q1));
  vedic_mul8 u_m2 (.a(a[H-1:0]),   .b(b[15:H]), .p(q2));
  vedic_mul8 u_m3 (.a(a[15:H]), .b(b[15:H]), .p(q3));

  mcsla #(.N(16)) u_add1 (.a(q1), .b(q2), .cin(1'b0), .s(sum1), .cout(ca1));
  mcsla #(.N(16)) u_add2 (.a(sum1), .b({{H{1'b0}}, q0[15:H]}), .cin(1'b0),
                        .s(sum2), .cout(ca2));
  mcsla #(.N(16)) u_add3 (.a(q3), .b({{(H-1){1'b0}}, ca1 | ca2, sum2[15:H]}),
                        .cin(1'b0), .s(sum3), .cout(ca3));

  assign p = {sum3, sum2[H-1:0], q0[H-1:0]};

  always_comb begin
    assert (!(ca1 && ca2)) else $error("vedic_mul16: both middle carries set");
    assert (!ca3)          else $error("vedic_mul16: final carry set");
  end
endmodule
