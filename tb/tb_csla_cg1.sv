// tb_csla_cg1: self-check of the carry generator for input carry 1. The
// half-sum and half-carry words of random operands drive it, and its carry
// word is compared with the carries of a + b + 1 found by integer addition.
module tb_csla_cg1;
  import tb_ref_pkg::*;
  localparam int N = 16;
  logic [N-1:0] a, b, s0, c0, c1_1;
  int checks = 0, failures = 0;

  assign s0 = a ^ b;
  assign c0 = a & b;

  csla_cg1 dut (.s0(s0), .c0(c0), .c1_1(c1_1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      case (i)
        0: begin a = '1; b = '0; end   // longest propagate chain
        1: begin a = '1; b = '1; end
        2: begin a = '0; b = '0; end
        default: begin a = N'($urandom); b = N'($urandom); end
      endcase
      #1;
      checks++;
      if (c1_1 != N'(carry_word(64'(a), 64'(b), 1'b1, N))) begin
        failures++;
        $display("FAIL a=%h b=%h carries=%h", a, b, c1_1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
