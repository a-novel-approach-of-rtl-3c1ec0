// mult6x6: 6-bit by 6-bit unsigned multiplier made of four 3x3 decoder
// multipliers and three shift-and-add stages.
//
// How it works: each operand is split into a low 3-bit block and a high
// 3-bit block, x = {xh, xl}, y = {yh, yl}. Four mult3x3 instances form the
// partial products xl*yl, xl*yh, xh*yl and xh*yh (6 bits each).
//   s1 = xl*yl + (xl*yh << 3)   9 bits   (low block of x times all of y)
//   s2 = xh*yl + (xh*yh << 3)   9 bits   (high block of x times all of y)
//   p  = s1 + (s2 << 3)         12 bits
// Every addition is a shift_adder, a ripple chain of half and full adders.
// Since x*y < 2^12 and each s < 2^9, no stage ever has a carry out of its
// top cell; the module asserts this.
//
// The split, the four 3x3 products and the two-step summation follow the
// published structure; the ripple-carry form of the adders is this
// design's choice.
//
// Interface: x, y are the 6-bit operands, p = x * y is the 12-bit product.
// Purely combinational; no clock, no reset.
module mult6x6 (
  input  logic [5:0]  x,
  input  logic [5:0]  y,
  output logic [11:0] p
);
  logic [5:0] p_ll, p_lh, p_hl, p_hh;   // x block, y block: l = low, h = high
  logic [8:0] s1, s2;
  logic       c1, c2, c3;

  mult3x3 u_m_ll (.x(x[2:0]), .y(y[2:0]), .p(p_ll));
  mult3x3 u_m_lh (.x(x[2:0]), .y(y[5:3]), .p(p_lh));
  mult3x3 u_m_hl (.x(x[5:3]), .y(y[2:0]), .p(p_hl));
  mult3x3 u_m_hh (.x(x[5:3]), .y(y[5:3]), .p(p_hh));

  shift_adder #(.WA(6), .WB(6), .SHIFT(3)) u_add_s1 (
    .a(p_ll), .b(p_lh), .sum(s1), .cout(c1)
  );
  shift_adder #(.WA(6), .WB(6), .SHIFT(3)) u_add_s2 (
    .a(p_hl), .b(p_hh), .sum(s2), .cout(c2)
  );
  shift_adder #(.WA(9), .WB(9), .SHIFT(3)) u_add_p (
    .a(s1), .b(s2), .sum(p), .cout(c3)
  );

  // A product of 6-bit numbers fits in 12 bits: no stage overflows.
  always_comb begin
    assert final (!(c1 || c2 || c3))
      else $error("mult6x6: carry out of a summation stage");
  end
endmodule
