// Shared constants and helpers of the radix-8 unsigned bit-pair recoding
// (BPR) multiplier.
//
// Sizes: the FP16 mantissa with its hidden bit is 11 bits wide; the core is
// built 12 bits wide so that the multiplier splits into three non-overlapping
// 4-bit groups. Each group yields one 16-bit partial product row and the
// three rows are summed into a 24-bit product.
//
// The csla_* functions describe the square-root partitioning of the carry
// select adder: group 0 holds 2 bits, group 1 holds 2 bits, and every later
// group is one bit longer than the one before (2, 2, 3, 4, 5, 6, ...). The
// last group is cut to the adder's width. The 2-2-3-4-5 sequence is the usual
// square-root carry select pattern; the document names the partitioning
// without listing group sizes, so the sequence is this design's choice.
package bpr_pkg;

  localparam int unsigned MANT_W  = 11;          // FP16 mantissa incl. hidden bit
  localparam int unsigned CORE_W  = 12;          // multiplier core operand width
  localparam int unsigned GROUP_W = 4;           // bits of Y per BPR group
  localparam int unsigned NUM_GRP = CORE_W / GROUP_W;  // partial product rows
  localparam int unsigned Z_W     = CORE_W + 2;  // width of the 3X multiple
  localparam int unsigned PP_W    = Z_W + 2;     // width of one row
  localparam int unsigned RES_W   = 2 * CORE_W;  // product width

  // Select codes of one bit pair: which multiple of X it picks.
  typedef enum logic [1:0] {
    SEL_0X = 2'b00,
    SEL_1X = 2'b01,
    SEL_2X = 2'b10,
    SEL_3X = 2'b11
  } bpr_sel_e;

  // Nominal size of square-root group g (before cutting to the adder width).
  function automatic int unsigned csla_nominal(input int unsigned g);
    return (g == 0) ? 2 : g + 1;
  endfunction

  // Lowest bit of group g.
  function automatic int unsigned csla_lo(input int unsigned g);
    int unsigned lo;
    lo = 0;
    for (int unsigned k = 0; k < g; k++) lo += csla_nominal(k);
    return lo;
  endfunction

  // Number of groups that cover an adder of width w.
  function automatic int unsigned csla_groups(input int unsigned w);
    int unsigned n;
    n = 0;
    while (csla_lo(n) < w) n++;
    return n;
  endfunction

  // Actual size of group g in an adder of width w.
  function automatic int unsigned csla_size(input int unsigned g, input int unsigned w);
    int unsigned lo;
    lo = csla_lo(g);
    return (lo + csla_nominal(g) > w) ? w - lo : csla_nominal(g);
  endfunction

endpackage
