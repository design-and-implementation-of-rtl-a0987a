// Self-checking testbench of bpr_logic: for all 16 values of the 4-bit
// multiplier group and many multiplicands it checks that z1 = y[1:0] * X and
// z2 = y[3:2] * X. The multiples fed in are computed here with integer
// arithmetic, independently of the predefined unit.
module tb_bpr_logic;
  int checks = 0;
  int failures = 0;

  logic [11:0] x1;
  logic [12:0] x2;
  logic [13:0] x3;
  logic [3:0]  y;
  logic [13:0] z1, z2;

  bpr_logic dut (.x1(x1), .x2(x2), .x3(x3), .y(y), .z1(z1), .z2(z2));

  task automatic check(input int xv, input int yv);
    x1 = 12'(xv);
    x2 = 13'(2 * xv);
    x3 = 14'(3 * xv);
    y  = 4'(yv);
    #1;
    checks++;
    if (int'(z1) != (yv % 4) * xv || int'(z2) != (yv / 4) * xv) begin
      failures++;
      $display("FAIL x=%0d y=%0d: z1=%0d z2=%0d", xv, yv, z1, z2);
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
    for (int yv = 0; yv < 16; yv++) begin
      check(0, yv);
      check(4095, yv);
      check(12'h555, yv);
      check(12'hAAA, yv);
      for (int k = 0; k < 200; k++) check(int'($urandom_range(4095)), yv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
