// Square-root carry select adder with binary-to-excess-1 converters
// (BEC-based SQRT-CSLA): sum = a + b + cin, cout = carry out of bit W-1.
//
// How it works: the W bits are cut into groups of 2, 2, 3, 4, 5, ... bits
// (bpr_pkg::csla_*; the last group is cut to fit). Group 0 is a ripple carry
// adder fed by cin. Every later group adds its bits once, with carry-in 0, in
// a ripple carry adder; a BEC adds one to that (W+1)-bit result to obtain the
// carry-in-1 result, and a 2:1 multiplexer driven by the carry leaving the
// group below picks one of the two. As groups grow by one bit, each group's
// own sum is ready about when the carry from below arrives.
//
// The document gives the function (BEC in place of the second ripple adder,
// square-root partitioning); the group sizes are this design's choice.
// Purely combinational, no clock.
module bec_sqrt_csla
  import bpr_pkg::*;
#(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NG = csla_groups(W);

  // c[g] is the carry into group g; c[NG] is the carry out of the adder.
  logic [NG:0] c;

  assign c[0] = cin;
  assign cout = c[NG];

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int unsigned LO = csla_lo(g);
    localparam int unsigned SZ = csla_size(g, W);

    if (g == 0) begin : g_first
      rca #(.W(SZ)) u_rca (
        .a(a[LO +: SZ]), .b(b[LO +: SZ]), .cin(c[g]),
        .sum(sum[LO +: SZ]), .cout(c[g+1])
      );
    end else begin : g_select
      logic [SZ:0] r0;  // {carry, sum} with carry-in 0
      logic [SZ:0] r1;  // {carry, sum} with carry-in 1, from the BEC

      rca #(.W(SZ)) u_rca (
        .a(a[LO +: SZ]), .b(b[LO +: SZ]), .cin(1'b0),
        .sum(r0[SZ-1:0]), .cout(r0[SZ])
      );
      bec #(.W(SZ + 1)) u_bec (.x(r0), .y(r1));

      assign {c[g+1], sum[LO +: SZ]} = c[g] ? r1 : r0;
    end
  end
endmodule
