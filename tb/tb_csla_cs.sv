// tb_csla_cs: self-check of the carry selection unit. The two candidate
// carry words of random operands (worked out by integer addition) drive it
// and the selected word must equal the carries for the applied cin.
module tb_csla_cs;
  import tb_ref_pkg::*;
  localparam int N = 16;
  logic [N-1:0] a, b, w0, w1, c;
  logic         cin;
  int checks = 0, failures = 0;

  csla_cs dut (.c1_0(w0), .c1_1(w1), .cin(cin), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a   = (i < 2) ? '1 : N'($urandom);
      b   = (i < 2) ? '0 : N'($urandom);
      cin = (i < 2) ? 1'(i) : 1'($urandom);
      w0  = N'(carry_word(64'(a), 64'(b), 1'b0, N));
      w1  = N'(carry_word(64'(a), 64'(b), 1'b1, N));
      #1;
      checks++;
      if (c != (cin ? w1 : w0)) begin
        failures++;
        $display("FAIL cin=%0d w0=%h w1=%h c=%h", cin, w0, w1, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
