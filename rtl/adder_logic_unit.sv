// Adder logic unit: sums the three partial product rows of the BPR
// multiplier into the product,
//
//   result = pp1 + (pp2 << SHIFT) + (pp3 << 2*SHIFT)
//
// where pp1 belongs to multiplier bits y[3:0], pp2 to y[7:4], pp3 to y[11:8].
//
// How it works: one carry-save stage reduces the three aligned rows to a sum
// row s and a carry row cy. Column by column it uses a full adder where all
// three rows have a bit, a half adder where two do, and a plain wire where
// one does (for the default sizes: bits 0-3 wires, 4-7 half adders, 8-15 full
// adders, 16-19 half adders, 20-23 wires). The two rows are then added,
// s + (cy << 1), by the BEC-based square-root carry select adder. Bit 0 of s
// passes straight to the result.
//
// The half adder / full adder compression followed by a BEC-based SQRT-CSLA
// follows the document; the single carry-save stage and the column layout are
// this design's reading of it. The final adder's carry out and the carry from
// the top column are left unconnected: the product of two 12-bit numbers
// always fits in 24 bits, so both are always 0. Purely combinational.
module adder_logic_unit #(
  parameter int unsigned PPW   = 16,
  parameter int unsigned SHIFT = 4,
  parameter int unsigned RES_W = 24
) (
  input  logic [PPW-1:0]   pp1,
  input  logic [PPW-1:0]   pp2,
  input  logic [PPW-1:0]   pp3,
  output logic [RES_W-1:0] result
);
  localparam int unsigned NROW = 3;

  // Rows zero-extended and aligned to their weights.
  logic [NROW-1:0][RES_W-1:0] row;
  assign row[0] = RES_W'(pp1);
  assign row[1] = RES_W'(pp2) << SHIFT;
  assign row[2] = RES_W'(pp3) << (2 * SHIFT);

  logic [RES_W-1:0] s;   // carry-save sum row
  logic [RES_W-1:0] cy;  // carry-save carry row, cy[i] has weight 2^(i+1)

  // Carry-save stage, one column at a time.
  for (genvar i = 0; i < RES_W; i++) begin : g_col
    localparam bit HAS0 = (i < PPW);
    localparam bit HAS1 = (i >= SHIFT) && (i < SHIFT + PPW);
    localparam bit HAS2 = (i >= 2 * SHIFT) && (i < 2 * SHIFT + PPW);
    localparam int unsigned N = int'(HAS0) + int'(HAS1) + int'(HAS2);

    if (N == 3) begin : g_fa
      full_adder u_fa (
        .a(row[0][i]), .b(row[1][i]), .c(row[2][i]), .s(s[i]), .co(cy[i])
      );
    end else if (N == 2) begin : g_ha
      // The two rows present in this column; the third bit is a known 0.
      localparam int unsigned RA = HAS0 ? 0 : 1;
      localparam int unsigned RB = HAS2 ? 2 : 1;
      half_adder u_ha (.a(row[RA][i]), .b(row[RB][i]), .s(s[i]), .co(cy[i]));
    end else begin : g_wire
      assign s[i]  = row[0][i] | row[1][i] | row[2][i];  // at most one is non-zero
      assign cy[i] = 1'b0;
    end
  end

  // Final carry-propagate addition of the two rows.
  logic carry_unused;  // always 0, see above

  assign result[0] = s[0];

  bec_sqrt_csla #(.W(RES_W - 1)) u_cpa (
    .a   (s[RES_W-1:1]),
    .b   (cy[RES_W-2:0]),
    .cin (1'b0),
    .sum (result[RES_W-1:1]),
    .cout(carry_unused)
  );
endmodule
