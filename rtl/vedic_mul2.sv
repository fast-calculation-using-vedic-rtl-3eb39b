// vedic_mul2: 2x2-bit unsigned multiplier by the Urdhva-Tiryakbhyam
// ("vertically and crosswise") rule.
//   s0     = a0 b0                 (vertical, LSBs)
//   c1 s1  = a1 b0 + a0 b1         (crosswise, first half adder)
//   c2 s2  = c1 + a1 b1            (vertical, MSBs, second half adder)
// p = {c2, s2, s1, s0}. Four AND gates and two half adders, as the 2x2
// block diagram shows. Combinational: the product is valid one gate-delay
// chain after a and b settle.
module vedic_mul2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic a1b0, a0b1, a1b1, c1;

  assign p[0] = a[0] & b[0];
  assign a1b0 = a[1] & b[0];
  assign a0b1 = a[0] & b[1];
  assign a1b1 = a[1] & b[1];

  half_adder u_ha_cross (.a(a0b1), .b(a1b0), .s(p[1]), .c(c1));
  half_adder u_ha_high  (.a(a1b1), .b(c1),   .s(p[2]), .c(p[3]));
endmodule
