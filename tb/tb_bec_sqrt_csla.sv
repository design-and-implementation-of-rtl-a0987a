// Self-checking testbench of bec_sqrt_csla, the BEC-based square-root carry
// select adder. It checks four widths at once: the 24-bit default (random
// operands plus carry-chain corner cases), and 13, 14 and 5 bits, the widths
// the multiplier also uses (5 bits exhaustively). The reference is the
// simulator's own '+'. It also counts how often a carry select group took
// its BEC (carry-in 1) result, and fails if that never happened.
module tb_bec_sqrt_csla;
  int checks = 0;
  int failures = 0;

  logic [23:0] a24, b24, s24;
  logic        ci24, co24;
  logic [12:0] a13, b13, s13;
  logic        ci13, co13;
  logic [13:0] a14, b14, s14;
  logic        ci14, co14;
  logic [4:0]  a5, b5, s5;
  logic        ci5, co5;

  bec_sqrt_csla dut24 (.a(a24), .b(b24), .cin(ci24), .sum(s24), .cout(co24));
  bec_sqrt_csla #(.W(13)) dut13 (.a(a13), .b(b13), .cin(ci13), .sum(s13), .cout(co13));
  bec_sqrt_csla #(.W(14)) dut14 (.a(a14), .b(b14), .cin(ci14), .sum(s14), .cout(co14));
  bec_sqrt_csla #(.W(5))  dut5  (.a(a5),  .b(b5),  .cin(ci5),  .sum(s5),  .cout(co5));

  int bec_selected = 0;

  task automatic check24(input logic [23:0] a, input logic [23:0] b, input logic ci);
    logic [24:0] exp;
    a24 = a; b24 = b; ci24 = ci;
    #1;
    exp = {1'b0, a} + {1'b0, b} + 25'(ci);
    checks++;
    if ({co24, s24} !== exp) begin
      failures++;
      $display("FAIL W=24 %h + %h + %0d: got %h expected %h", a, b, ci, {co24, s24}, exp);
    end
    if (|dut24.c[dut24.NG-1:1]) bec_selected++;
  endtask

  task automatic check_small(input logic [13:0] a, input logic [13:0] b, input logic ci);
    logic [14:0] e14;
    logic [13:0] e13;
    logic [5:0]  e5;
    a13 = a[12:0]; b13 = b[12:0]; ci13 = ci;
    a14 = a;       b14 = b;       ci14 = ci;
    a5  = a[4:0];  b5  = b[4:0];  ci5  = ci;
    #1;
    e14 = {1'b0, a} + {1'b0, b} + 15'(ci);
    e13 = {1'b0, a[12:0]} + {1'b0, b[12:0]} + 14'(ci);
    e5  = {1'b0, a[4:0]} + {1'b0, b[4:0]} + 6'(ci);
    checks += 3;
    if ({co14, s14} !== e14) begin
      failures++;
      $display("FAIL W=14 %h + %h + %0d: got %h expected %h", a, b, ci, {co14, s14}, e14);
    end
    if ({co13, s13} !== e13) begin
      failures++;
      $display("FAIL W=13 %h + %h + %0d: got %h expected %h", a[12:0], b[12:0], ci, {co13, s13}, e13);
    end
    if ({co5, s5} !== e5) begin
      failures++;
      $display("FAIL W=5 %h + %h + %0d: got %h expected %h", a[4:0], b[4:0], ci, {co5, s5}, e5);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Carry-chain corner cases at 24 bits.
    check24('0, '0, 1'b0);
    check24('1, '0, 1'b1);
    check24('1, '1, 1'b1);
    check24('1, 24'd1, 1'b0);
    check24(24'h555555, 24'hAAAAAA, 1'b1);
    check24(24'h00FFFF, 24'h000001, 1'b0);
    for (int k = 0; k < 24; k++) check24(24'((1 << k) - 1), 24'(1 << k) - 24'd1, 1'b1);
    for (int k = 0; k < 20000; k++) check24(24'($urandom), 24'($urandom), 1'($urandom));

    // 5 bits exhaustively; 13 and 14 bits at random, all three together.
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 32; b++)
        for (int c = 0; c < 2; c++) check_small(14'(a), 14'(b), 1'(c));
    check_small('1, '1, 1'b1);
    for (int k = 0; k < 20000; k++) check_small(14'($urandom), 14'($urandom), 1'($urandom));

    $display("mechanism: BEC (carry-in 1) result selected in the 24-bit adder %0d times", bec_selected);
    if (bec_selected == 0) begin
      failures++;
      $display("FAIL BEC path never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
