// tb_vedic_mul8: self-check of the 8x8 Vedic multiplier against the
// integer product. All 65536 operand
// pairs are applied, beginning with the two products 29 x 207 = 6003 and
// 35 x 10 = 350 shown in the reference 8x8 simulation.
// It also counts how often the cross-product adder (ca1) and the adder of
// the high half of aL*bL (ca2) carry into the top adder, including the case
// where only ca2 does, and fails if any of these never happened.
module tb_vedic_mul8;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;
  int n_ca1 = 0, n_ca2 = 0, n_ca2_only = 0;

  vedic_mul8 dut (.a(a), .b(b), .p(p));

  task automatic check(input logic [7:0] x, input logic [7:0] y);
    a = x;
    b = y;
    #1;
    checks++;
    if (p != 16'(64'(x) * 64'(y))) begin
      failures++;
      $display("FAIL %0d * %0d -> %0d", x, y, p);
    end
    if (dut.ca1) n_ca1++;
    if (dut.ca2) n_ca2++;
    if (dut.ca2 && !dut.ca1) n_ca2_only++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(8'd29, 8'd207);
    if (p != 16'd6003) failures++;
    check(8'd35, 8'd10);
    if (p != 16'd350) failures++;
    checks += 2;
    for (int i = 0; i < 65536; i++) check(8'(i >> 8), 8'(i));
    $display("carry from ADD1 %0d times, from ADD2 %0d times (%0d with ADD1 clear)",
             n_ca1, n_ca2, n_ca2_only);
    checks += 3;
    if (n_ca1 == 0) failures++;
    if (n_ca2 == 0) failures++;
    if (n_ca2_only == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
