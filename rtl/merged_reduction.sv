// Merged reduction: turns the two multiples chosen for a 4-bit group into the
// group's single partial product row, pp = z1 + (z2 << 2).
//
// The shift of z2 is wiring. The two low bits of pp are z1[1:0] unchanged;
// the upper ZW bits are z1[ZW-1:2] + z2 in a ZW-bit carry select adder.
// Its carry out is left unconnected: z1 and z2 are multiples 0..3 of a
// (ZW-2)-bit X, so pp <= 15 * (2^(ZW-2) - 1) always fits in ZW+2 bits and
// that carry is always 0. Following the document, recoding and
// reduction share one combinational step: there is no separate compressor
// tree. Purely combinational.
module merged_reduction #(
  parameter int unsigned ZW = 14
) (
  input  logic [ZW-1:0] z1,
  input  logic [ZW-1:0] z2,
  output logic [ZW+1:0] pp
);
  logic carry_unused;  // always 0 for legal inputs, see above

  assign pp[1:0] = z1[1:0];

  bec_sqrt_csla #(.W(ZW)) u_add (
    .a   ({2'b00, z1[ZW-1:2]}),
    .b   (z2),
    .cin (1'b0),
    .sum (pp[ZW+1:2]),
    .cout(carry_unused)
  );
endmodule
