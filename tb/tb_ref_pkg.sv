// tb_ref_pkg: reference models shared by the adder testbenches. They use
// plain integer addition, so they are independent of the gate-level carry
// recurrences in the design.
package tb_ref_pkg;
  // Carry out of bit i of a + b + cin, for every i < n (n <= 32):
  // bit i+1 of the sum of the operands truncated to bits i..0.
  function automatic longint unsigned carry_word(longint unsigned a,
                                                 longint unsigned b,
                                                 bit cin, int n);
    longint unsigned w = 0, m;
    for (int i = 0; i < n; i++) begin
      m = (64'd1 << (i + 1)) - 1;
      if ((((a & m) + (b & m) + 64'(cin)) >> (i + 1)) & 64'd1) w |= 64'd1 << i;
    end
    return w;
  endfunction
endpackage
