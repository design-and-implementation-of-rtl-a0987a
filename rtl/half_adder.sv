// One-bit half adder: sum = a ^ b, carry = a & b. Purely combinational.
// Used in the carry-save stage of the adder logic unit where a column holds
// only two partial product bits.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
