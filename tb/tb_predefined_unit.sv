// Self-checking testbench of predefined_unit: for every 12-bit multiplicand
// it checks 1X = x, 2X = 2x and 3X = 3x against integer arithmetic.
module tb_predefined_unit;
  int checks = 0;
  int failures = 0;

  logic [11:0] x, x1;
  logic [12:0] x2;
  logic [13:0] x3;

  predefined_unit dut (.x(x), .x1(x1), .x2(x2), .x3(x3));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      x = 12'(v);
      #1;
      checks++;
      if (int'(x1) != v || int'(x2) != 2 * v || int'(x3) != 3 * v) begin
        failures++;
        $display("FAIL x=%0d: 1X=%0d 2X=%0d 3X=%0d", v, x1, x2, x3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
