// tb_rca: exhaustive self-check of the 4-bit ripple carry adder:
// every a, b and carry-in is compared with the integer sum.
module tb_rca;
  logic [3:0] a, b, s;
  logic       ci, co;
  int checks = 0, failures = 0;

  rca dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {ci, a, b} = 9'(i);
      #1;
      checks++;
      if ({co, s} != 5'(int'(a) + int'(b) + int'(ci))) begin
        failures++;
        $display("FAIL %0d + %0d + %0d -> %0d", a, b, ci, {co, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
