// Radix-8 unsigned bit-pair recoding (BPR) multiplier for FP16 mantissas.
//
// result = X * Y for two unsigned IN_W-bit operands (the 11-bit significand
// of an IEEE 754 half-precision number, hidden bit included), exact and
// untruncated in RES_W = 24 bits.
//
// How it works: both operands are zero-extended to the 12-bit core width.
// The predefined unit forms 1X, 2X and 3X of X once. The 12-bit Y is cut into
// three non-overlapping 4-bit groups; for each, a BPR logic unit selects one
// multiple of X with the low bit pair (z1) and one with the high bit pair
// (z2), and a merged reduction unit forms the group's row z1 + (z2 << 2).
// The adder logic unit adds the three rows at weights 1, 16 and 256. Since
// every multiple is positive there is no negative encoding, sign extension or
// two's complement correction anywhere.
//
// Block structure, unit names and bus widths follow the document's top-level
// schematic; the order in which the rows are numbered (pp1 = lowest group) is
// this design's choice. Purely combinational: no clock, no reset, no
// registers; the product is valid one combinational delay after the inputs.
module bpr_multiplier
  import bpr_pkg::*;
#(
  parameter int unsigned IN_W = MANT_W
) (
  input  logic [IN_W-1:0]  X,
  input  logic [IN_W-1:0]  Y,
  output logic [RES_W-1:0] result
);
  if (IN_W > CORE_W) begin : g_bad_width
    $error("bpr_multiplier: IN_W must not exceed the 12-bit core width");
  end

  // Operands zero-extended to the core width (X[11] and Y[11] tied to 0).
  logic [CORE_W-1:0] x;
  logic [CORE_W-1:0] y;
  assign x = CORE_W'(X);
  assign y = CORE_W'(Y);

  // Multiples of X.
  logic [CORE_W-1:0] x1;
  logic [CORE_W:0]   x2;
  logic [CORE_W+1:0] x3;

  predefined_unit #(.W(CORE_W)) PU (.x(x), .x1(x1), .x2(x2), .x3(x3));

  // One BPR logic unit and one merged reduction unit per 4-bit group of Y.
  logic [NUM_GRP-1:0][Z_W-1:0]  z1;
  logic [NUM_GRP-1:0][Z_W-1:0]  z2;
  logic [NUM_GRP-1:0][PP_W-1:0] pp;

  for (genvar g = 0; g < NUM_GRP; g++) begin : g_group
    bpr_logic #(.W(CORE_W)) bpr_unit (
      .x1(x1), .x2(x2), .x3(x3),
      .y (y[g*GROUP_W +: GROUP_W]),
      .z1(z1[g]), .z2(z2[g])
    );
    merged_reduction #(.ZW(Z_W)) MR_unit (.z1(z1[g]), .z2(z2[g]), .pp(pp[g]));
  end

  adder_logic_unit #(.PPW(PP_W), .SHIFT(GROUP_W), .RES_W(RES_W)) Adder_unit (
    .pp1(pp[0]), .pp2(pp[1]), .pp3(pp[2]), .result(result)
  );
endmodule
