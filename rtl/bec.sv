// W-bit binary-to-excess-1 converter: y = x + 1 (modulo 2^W).
// Bit 0 is inverted; bit i toggles when all bits below it are 1, so the
// converter needs only an AND chain and XOR gates instead of a second ripple
// carry adder. Purely combinational. In the carry select adder it turns the
// carry-in-0 result of a group into its carry-in-1 result.
module bec #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);
  logic [W-1:0] all_ones;  // all_ones[i]: x[i-1:0] are all 1

  assign all_ones[0] = 1'b1;
  for (genvar i = 1; i < W; i++) begin : g_chain
    assign all_ones[i] = all_ones[i-1] & x[i-1];
  end

  assign y = x ^ all_ones;
endmodule
