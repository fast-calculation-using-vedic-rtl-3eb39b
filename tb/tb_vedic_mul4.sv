// tb_vedic_mul4: exhaustive self-check of the 4x4 Vedic multiplier against
// the integer product. It also counts how often each of the two middle
// adder carries (ca1 from the cross-product sum, ca2 from adding the high
// half of aL*bL) is the one that carries into the top adder, including the
// case where only ca2 does, and fails if any of these never occurs.
module tb_vedic_mul4;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;
  int n_ca1 = 0, n_ca2 = 0, n_ca2_only = 0;

  vedic_mul4 dut (.a(a), .b(b), .p(p));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a, b} = 8'(i);
      #1;
      checks++;
      if (p != 8'(int'(a) * int'(b))) begin
        failures++;
        $display("FAIL %0d * %0d -> %0d", a, b, p);
      end
      if (dut.ca1) n_ca1++;
      if (dut.ca2) n_ca2++;
      if (dut.ca2 && !dut.ca1) n_ca2_only++;
    end
    $display("carry from ADD1: %0d times, carry from ADD2: %0d times (%0d with ADD1 clear)",
             n_ca1, n_ca2, n_ca2_only);
    checks += 3;
    if (n_ca2_only == 0) failures++;
    if (n_ca1 == 0) failures++;
    if (n_ca2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
