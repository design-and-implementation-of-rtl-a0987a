// Predefined logic unit (PLU): prepares the multiples of the multiplicand
// that every bit-pair recoding unit chooses from.
//
//   x1 = 1X  plain wiring of x                 (W bits)
//   x2 = 2X  x shifted left by one, by wiring  (W+1 bits)
//   x3 = 3X  x + 2X in a carry select adder    (W+2 bits)
//
// The three outputs follow the document, as do their widths for W = 12. The
// carry select adder used for 3X is the same BEC-based square-root CSLA as
// the final adder, which is this design's choice: the document asks only for
// a fast carry select adder. Purely combinational.
module predefined_unit #(
  parameter int unsigned W = 12
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] x1,
  output logic [W:0]   x2,
  output logic [W+1:0] x3
);
  assign x1 = x;
  assign x2 = {x, 1'b0};

  // 3X = {0, x} + {x, 0}: a (W+1)-bit add whose carry out is the top bit.
  bec_sqrt_csla #(.W(W + 1)) u_add3x (
    .a   ({1'b0, x}),
    .b   (x2),
    .cin (1'b0),
    .sum (x3[W:0]),
    .cout(x3[W+1])
  );
endmodule
