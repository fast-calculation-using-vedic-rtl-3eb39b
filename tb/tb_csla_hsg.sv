// tb_csla_hsg: random and corner self-check of the half-sum generator:
// s0 must be the carry-less sum and c0 the bitwise carries of a and b.
module tb_csla_hsg;
  localparam int N = 16;
  logic [N-1:0] a, b, s0, c0;
  int checks = 0, failures = 0;

  csla_hsg dut (.a(a), .b(b), .s0(s0), .c0(c0));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = (i == 0) ? '1 : N'($urandom);
      b = (i == 1) ? '1 : N'($urandom);
      #1;
      checks++;
      // a + b = s0 + 2*c0 holds only for the true half-sum / half-carry pair,
      // and s0 & c0 must be disjoint.
      if ((32'(a) + 32'(b)) != (32'(s0) + (32'(c0) << 1)) || (s0 & c0) != '0) begin
        failures++;
        $display("FAIL a=%h b=%h s0=%h c0=%h", a, b, s0, c0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
