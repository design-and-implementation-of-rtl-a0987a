// End-to-end, self-checking testbench of bpr_multiplier at its default
// parameters (11-bit operands, 24-bit product).
//
// It applies the corner cases of the FP16 mantissa range (all zeros, the
// largest operands 2047 x 2047, alternating bit patterns, single bits), then
// 50 random operand pairs, then every one of the 2^22 operand pairs, and
// compares each product with X * Y computed by the simulator. The design is
// combinational, so each product is sampled one time step after its operands
// change.
//
// Mechanism coverage, each of which must occur at least once: every select
// code (0X, 1X, 2X, 3X) on every bit pair of Y that can take it (the top pair
// holds Y[11] = 0 and so sees only 0X and 1X), a carry out of the carry-save
// stage, and the BEC (carry-in 1) result being selected in the 3X adder, in
// each merged reduction unit and in the final adder.
module tb_bpr_multiplier;
  int checks = 0;
  int failures = 0;

  logic [10:0] X, Y;
  logic [23:0] result;

  bpr_multiplier dut (.X(X), .Y(Y), .result(result));

  int sel_seen[6][4];     // [bit pair of Y][select code]
  int csa_carries = 0;
  int bec_plu = 0;
  int bec_mr[3] = '{0, 0, 0};
  int bec_final = 0;

  task automatic check(input int xv, input int yv);
    int exp;
    logic [11:0] ye;
    X = 11'(xv);
    Y = 11'(yv);
    #1;
    exp = xv * yv;
    checks++;
    if (int'(result) != exp) begin
      failures++;
      if (failures <= 20) $display("FAIL %0d * %0d: got %0d expected %0d", xv, yv, result, exp);
    end
    ye = 12'(yv);
    for (int p = 0; p < 6; p++) sel_seen[p][ye[2*p +: 2]]++;
    if (|dut.Adder_unit.cy) csa_carries++;
    if (|dut.PU.u_add3x.c[dut.PU.u_add3x.NG-1:1]) bec_plu++;
    if (|dut.g_group[0].MR_unit.u_add.c[dut.g_group[0].MR_unit.u_add.NG-1:1]) bec_mr[0]++;
    if (|dut.g_group[1].MR_unit.u_add.c[dut.g_group[1].MR_unit.u_add.NG-1:1]) bec_mr[1]++;
    if (|dut.g_group[2].MR_unit.u_add.c[dut.g_group[2].MR_unit.u_add.NG-1:1]) bec_mr[2]++;
    if (|dut.Adder_unit.u_cpa.c[dut.Adder_unit.u_cpa.NG-1:1]) bec_final++;
  endtask

  task automatic require(input string what, input int count);
    $display("mechanism: %-40s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin : watchdog
    #20_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pass_before;
    foreach (sel_seen[p, c]) sel_seen[p][c] = 0;

    // Corner cases.
    check(0, 0);
    check(2047, 2047);
    check(2047, 0);
    check(0, 2047);
    check(11'h555, 11'h2AA);
    check(11'h2AA, 11'h555);
    check(11'h555, 11'h555);
    check(1024, 1024);   // hidden bits only: 1.0 x 1.0
    check(1, 2047);
    // A worked example: 11110000101b * 00001111000b = 000000111000011001011000b.
    check(11'b11110000101, 11'b00001111000);
    checks++;
    if (result !== 24'b000000111000011001011000) begin
      failures++;
      $display("FAIL worked example: got %b", result);
    end

    // 50 random operand pairs.
    pass_before = checks - failures;
    for (int k = 0; k < 50; k++) check(int'($urandom_range(2047)), int'($urandom_range(2047)));
    $display("random tests done = 50, passed = %0d", checks - failures - pass_before);

    // Full operand range.
    for (int xv = 0; xv < 2048; xv++)
      for (int yv = 0; yv < 2048; yv++) check(xv, yv);

    for (int p = 0; p < 6; p++)
      for (int c = 0; c < ((p == 5) ? 2 : 4); c++)
        require($sformatf("Y bit pair %0d selects %0dX", p, c), sel_seen[p][c]);
    require("carry-save stage carry", csa_carries);
    require("BEC result selected in 3X adder", bec_plu);
    for (int g = 0; g < 3; g++)
      require($sformatf("BEC result selected in merged reduction %0d", g), bec_mr[g]);
    require("BEC result selected in final adder", bec_final);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
