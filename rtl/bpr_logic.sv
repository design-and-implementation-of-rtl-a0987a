// Bit-pair recoding logic for one non-overlapping 4-bit group of the
// multiplier. Two 4:1 multiplexers choose among {0, 1X, 2X, 3X}:
//
//   z1 = multiple selected by y[1:0]   (weight 1 within the group)
//   z2 = multiple selected by y[3:2]   (weight 4 within the group)
//
// Codes 00/01/10/11 select 0/1X/2X/3X. All multiples are positive, so there
// is no negative encoding and no sign extension; the narrower multiples are
// zero-extended to the W+2-bit width of 3X. The structure and widths follow
// the document. Purely combinational.
module bpr_logic
  import bpr_pkg::*;
#(
  parameter int unsigned W = 12
) (
  input  logic [W-1:0] x1,
  input  logic [W:0]   x2,
  input  logic [W+1:0] x3,
  input  logic [3:0]   y,
  output logic [W+1:0] z1,
  output logic [W+1:0] z2
);
  function automatic logic [W+1:0] select_multiple(
    input bpr_sel_e    sel,
    input logic [W-1:0] m1,
    input logic [W:0]   m2,
    input logic [W+1:0] m3
  );
    unique case (sel)
      SEL_0X:  return '0;
      SEL_1X:  return {2'b00, m1};
      SEL_2X:  return {1'b0, m2};
      default: return m3;
    endcase
  endfunction

  always_comb begin
    z1 = select_multiple(bpr_sel_e'(y[1:0]), x1, x2, x3);
    z2 = select_multiple(bpr_sel_e'(y[3:2]), x1, x2, x3);
  end
endmodule
