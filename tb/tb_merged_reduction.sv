// Self-checking testbench of merged_reduction: z1 and z2 are drawn as the
// multiples 0..3 of a 12-bit value, as the BPR logic produces them, and the
// row must equal z1 + 4*z2. Includes the largest row, 15 * 4095.
module tb_merged_reduction;
  int checks = 0;
  int failures = 0;

  logic [13:0] z1, z2;
  logic [15:0] pp;

  merged_reduction dut (.z1(z1), .z2(z2), .pp(pp));

  task automatic check(input int v1, input int v2);
    z1 = 14'(v1);
    z2 = 14'(v2);
    #1;
    checks++;
    if (int'(pp) != v1 + 4 * v2) begin
      failures++;
      $display("FAIL z1=%0d z2=%0d: pp=%0d expected %0d", v1, v2, pp, v1 + 4 * v2);
    end
  endtask

  initial begin : watchdog
    #100_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0);
    check(3 * 4095, 3 * 4095);
    check(3 * 4095, 0);
    check(0, 3 * 4095);
    for (int k = 0; k < 20000; k++) begin
      int xv;
      xv = int'($urandom_range(4095));
      check(int'($urandom_range(3)) * xv, int'($urandom_range(3)) * xv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
