// tb_csla_fsg: self-check of the final-sum generator. It gets the half-sum
// word and the true carry word of random a + b + cin and must produce the
// low N bits of that sum.
module tb_csla_fsg;
  import tb_ref_pkg::*;
  localparam int N = 16;
  logic [N-1:0] a, b, s0, cw, s;
  logic         cin;
  int checks = 0, failures = 0;

  assign s0 = a ^ b;

  csla_fsg dut (.s0(s0), .c(cw[N-2:0]), .cin(cin), .s(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a   = N'($urandom);
      b   = N'($urandom);
      cin = 1'($urandom);
      cw  = N'(carry_word(64'(a), 64'(b), cin, N));
      #1;
      checks++;
      if (s != N'(32'(a) + 32'(b) + 32'(cin))) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%0d s=%h", a, b, cin, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
