// tb_mcsla: self-check of the modified carry select adder at its default
// width (16) and at the other two widths the design is evaluated at (8 and
// 32). Random operands plus the full-propagate and all-ones corners, with
// both input carries, are compared with integer addition. Counts how often
// cin = 1 selected the CG1 carry word and how often a carry left the top
// bit, and fails if either never happened.
module tb_mcsla;
  logic [15:0] a16, b16, s16;
  logic [7:0]  a8,  b8,  s8;
  logic [31:0] a32, b32, s32;
  logic        cin, co16, co8, co32;
  int checks = 0, failures = 0;
  int n_cin1 = 0, n_cout = 0;

  mcsla             dut16 (.a(a16), .b(b16), .cin(cin), .s(s16), .cout(co16));
  mcsla #(.N(8))    dut8  (.a(a8),  .b(b8),  .cin(cin), .s(s8),  .cout(co8));
  mcsla #(.N(32))   dut32 (.a(a32), .b(b32), .cin(cin), .s(s32), .cout(co32));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      case (i % 1000)
        0: begin a32 = '1; b32 = '0; cin = 1'b1; end   // carry ripples through all bits
        1: begin a32 = '1; b32 = '1; cin = 1'b1; end
        2: begin a32 = '0; b32 = '0; cin = 1'b0; end
        3: begin a32 = '1; b32 = '0; cin = 1'b0; end
        default: begin a32 = $urandom; b32 = $urandom; cin = 1'($urandom); end
      endcase
      a16 = a32[15:0]; b16 = b32[15:0];
      a8  = a32[7:0];  b8  = b32[7:0];
      #1;
      checks += 3;
      if ({co16, s16} != 17'(33'(a16) + 33'(b16) + 33'(cin))) begin
        failures++;
        $display("FAIL16 %h + %h + %0d -> %h", a16, b16, cin, {co16, s16});
      end
      if ({co8, s8} != 9'(33'(a8) + 33'(b8) + 33'(cin))) begin
        failures++;
        $display("FAIL8 %h + %h + %0d -> %h", a8, b8, cin, {co8, s8});
      end
      if ({co32, s32} != 33'(a32) + 33'(b32) + 33'(cin)) begin
        failures++;
        $display("FAIL32 %h + %h + %0d -> %h", a32, b32, cin, {co32, s32});
      end
      if (cin && (dut16.u_cs.c != dut16.u_cg0.c1_0)) n_cin1++;
      if (co16) n_cout++;
    end
    $display("cin=1 changed the carry word %0d times, carry out %0d times", n_cin1, n_cout);
    checks += 2;
    if (n_cin1 == 0) failures++;
    if (n_cout == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
