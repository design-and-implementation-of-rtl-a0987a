// Self-checking testbench of adder_logic_unit: three rows in the range a BPR
// group can produce (0 .. 15 * 4095) are summed with weights 1, 16 and 256
// and compared with integer arithmetic. It also counts how often the
// carry-save stage produced a carry and the final adder selected a BEC
// result, and fails if either never happened.
module tb_adder_logic_unit;
  int checks = 0;
  int failures = 0;

  localparam int PP_MAX = 15 * 4095;

  logic [15:0] pp1, pp2, pp3;
  logic [23:0] result;

  adder_logic_unit dut (.pp1(pp1), .pp2(pp2), .pp3(pp3), .result(result));

  int csa_carries = 0;
  int bec_selected = 0;

  task automatic check(input int p1, input int p2, input int p3);
    int exp;
    pp1 = 16'(p1);
    pp2 = 16'(p2);
    pp3 = 16'(p3);
    #1;
    exp = p1 + 16 * p2 + 256 * p3;
    checks++;
    if (int'(result) != exp) begin
      failures++;
      $display("FAIL %0d + 16*%0d + 256*%0d: got %0d expected %0d", p1, p2, p3, result, exp);
    end
    if (|dut.cy) csa_carries++;
    if (|dut.u_cpa.c[dut.u_cpa.NG-1:1]) bec_selected++;
  endtask

  initial begin : watchdog
    #100_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0, 0);
    check(PP_MAX, PP_MAX, PP_MAX);
    check(PP_MAX, 0, 0);
    check(0, PP_MAX, 0);
    check(0, 0, PP_MAX);
    check(16'h5555, 16'h2AAA, 16'h5555);
    for (int k = 0; k < 20000; k++)
      check(int'($urandom_range(PP_MAX)), int'($urandom_range(PP_MAX)), int'($urandom_range(PP_MAX)));
    $display("mechanism: carry-save carries %0d, BEC result selected %0d", csa_carries, bec_selected);
    if (csa_carries == 0 || bec_selected == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
