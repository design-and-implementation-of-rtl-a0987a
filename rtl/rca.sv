// W-bit ripple carry adder: a chain of full adders, sum = a + b + cin with
// the carry out of the top bit on cout. Purely combinational; the delay grows
// linearly with W. It forms each group of the square-root carry select adder.
module rca #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;
  assign cout = c[W];

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .c(c[i]), .s(sum[i]), .co(c[i+1]));
  end
endmodule
