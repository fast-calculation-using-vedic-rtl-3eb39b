// csla_fsg: final-sum generator of the modified carry select adder.
// s(0) = s0(0) XOR cin and s(i) = s0(i) XOR c(i-1) for i > 0: the half-sum
// word XORed with the selected carry word shifted up by one. n XOR gates,
// combinational. Follows the FSG gate diagram.
module csla_fsg #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] s0,
  input  logic [N-2:0] c,
  input  logic         cin,
  output logic [N-1:0] s
);
  assign s = s0 ^ {c, cin};
endmodule
