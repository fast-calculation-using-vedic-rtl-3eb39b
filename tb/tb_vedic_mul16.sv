// tb_vedic_mul16: self-check of the 16x16 Vedic multiplier against the
// integer product. This is the end-to-end test of
// the whole design at its default size: corner operands, the worked example
// 252 x 846 = 213192, long runs of equal operands and 300000 random pairs.
// Besides the 16-bit level counters below, it counts the ca2-only case
// inside one 8x8 and one 4x4 sub-multiplier, so the carry fix is exercised
// at every level of the hierarchy.
// It also counts how often the cross-product adder (ca1) and the adder of
// the high half of aL*bL (ca2) carry into the top adder, including the case
// where only ca2 does, and fails if any of these never happened.
module tb_vedic_mul16;
  logic [15:0]  a, b;
  logic [31:0] p;
  int checks = 0, failures = 0;
  int n_ca1 = 0, n_ca2 = 0, n_ca2_only = 0;
  int n8_ca2_only = 0, n4_ca2_only = 0;

  vedic_mul16 dut (.a(a), .b(b), .p(p));

  task automatic check(input logic [15:0] x, input logic [15:0] y);
    a = x;
    b = y;
    #1;
    checks++;
    if (p != 32'(64'(x) * 64'(y))) begin
      failures++;
      $display("FAIL %0d * %0d -> %0d", x, y, p);
    end
    if (dut.ca1) n_ca1++;
    if (dut.ca2) n_ca2++;
    if (dut.ca2 && !dut.ca1) n_ca2_only++;
    if (dut.u_m1.ca2 && !dut.u_m1.ca1) n8_ca2_only++;
    if (dut.u_m1.u_m1.ca2 && !dut.u_m1.u_m1.ca1) n4_ca2_only++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'd252, 16'd846);
    checks++;
    if (p != 32'd213192) failures++;
    check('0, '0);
    check('1, '1);
    check('1, 16'd1);
    check(16'h8000, 16'h8000);
    check(16'h00ff, 16'hff00);
    for (int i = 0; i < 65536; i += 257) check(16'(i), 16'(i));
    for (int i = 0; i < 300000; i++) check(16'($urandom), 16'($urandom));
    $display("carry from ADD1 %0d times, from ADD2 %0d times (%0d with ADD1 clear)",
             n_ca1, n_ca2, n_ca2_only);
    $display("ca2 without ca1 inside an 8x8: %0d, inside a 4x4: %0d", n8_ca2_only, n4_ca2_only);
    checks += 5;
    if (n8_ca2_only == 0) failures++;
    if (n4_ca2_only == 0) failures++;
    if (n_ca1 == 0) failures++;
    if (n_ca2 == 0) failures++;
    if (n_ca2_only == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
