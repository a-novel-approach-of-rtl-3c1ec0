// shift_adder: computes sum = a + (b << SHIFT), the "add with a left shift"
// step that joins two partial products in the 6x6 and 12x12 multipliers.
//
// How it works: the SHIFT low bits of a pass straight to the sum, since
// nothing is added to them. Where the upper bits of a overlap the low bits
// of b, a ripple chain of adder cells adds them (a half adder on the first
// bit, which has no carry in, then full adders). Above the overlap only
// b and the carry remain, so half adders finish the chain. The chain is
// built from the half_adder and full_adder cells.
//
// Widths: a is WA bits, b is WB bits, the sum is WB+SHIFT bits and cout is
// the carry out of the top cell. The multipliers choose widths such that the
// true sum always fits in WB+SHIFT bits, so cout is 0 there; they assert it.
// Requires WA > SHIFT and WA <= WB + SHIFT.
//
// Defaults are the first summation of the 6x6 multiplier: two 6-bit
// products, the second shifted left by 3, giving a 9-bit result. The
// 12x12 multiplier uses the same module as its 18-bit and 24-bit adders.
// A ripple-carry chain is this design's choice; the cell types (half and
// full adders) and the widths follow the multiplier descriptions.
// Purely combinational; no clock, no reset.
module shift_adder #(
  parameter int unsigned WA    = 6,
  parameter int unsigned WB    = 6,
  parameter int unsigned SHIFT = 3
) (
  input  logic [WA-1:0]       a,
  input  logic [WB-1:0]       b,
  output logic [WB+SHIFT-1:0] sum,
  output logic                cout
);
  localparam int unsigned OVL = WA - SHIFT;   // overlapping bits of a and b
  localparam int unsigned WO  = WB + SHIFT;   // width of the sum

  // carry[i] is the carry into sum bit SHIFT+i (there is none into bit SHIFT)
  logic [WB:1] carry;

  assign sum[SHIFT-1:0] = a[SHIFT-1:0];

  genvar i;
  generate
    for (i = 0; i < WB; i++) begin : g_bit
      if (i == 0) begin : g_first
        half_adder u_ha (
          .a(a[SHIFT]), .b(b[0]), .s(sum[SHIFT]), .c(carry[1])
        );
      end else if (i < OVL) begin : g_overlap
        full_adder u_fa (
          .a(a[SHIFT+i]), .b(b[i]), .ci(carry[i]),
          .s(sum[SHIFT+i]), .co(carry[i+1])
        );
      end else begin : g_upper
        half_adder u_ha (
          .a(b[i]), .b(carry[i]), .s(sum[SHIFT+i]), .c(carry[i+1])
        );
      end
    end
  endgenerate

  assign cout     = carry[WB];

  initial begin
    if (WA <= SHIFT || WA > WO)
      $error("shift_adder: need SHIFT < WA <= WB+SHIFT");
  end
endmodule
