// half_adder: one-bit half adder, the smallest cell of the shift-and-add
// summation stages of the 6x6 and 12x12 multipliers.
// It adds two bits and returns their sum bit and carry bit:
//   s = a ^ b, c = a & b.
// Purely combinational; no clock, no reset.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  always_comb begin
    s = a ^ b;
    c = a & b;
  end
endmodule
