// One-bit full adder: sum = a ^ b ^ c, carry = majority(a, b, c).
// Purely combinational. Used by the ripple carry groups of the carry select
// adders and by the carry-save stage of the adder logic unit.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ c;
    co = (a & b) | (a & c) | (b & c);
  end
endmodule
