// full_adder: one-bit full adder, the cell the summation stages of the
// 6x6 and 12x12 multipliers use wherever two operand bits and a carry meet.
// It adds three bits and returns their sum bit and carry bit:
//   s  = a ^ b ^ ci
//   co = majority(a, b, ci)
// Purely combinational; no clock, no reset.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule
