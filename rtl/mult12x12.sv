// mult12x12: 12-bit by 12-bit unsigned multiplier, the top of the design.
// It is built from four 6x6 multipliers exactly as those are built from
// 3x3 decoder multipliers, so its leaves are sixteen mult3x3 decoders.
//
// How it works: x = {xh, xl}, y = {yh, yl} with 6-bit blocks. Four mult6x6
// instances form xl*yl, xl*yh, xh*yl and xh*yh (12 bits each). Then
//   s1 = xl*yl + (xl*yh << 6)   18-bit adder
//   s2 = xh*yl + (xh*yh << 6)   18-bit adder
//   p  = s1 + (s2 << 6)         24-bit adder
// Each adder is a shift_adder, a ripple chain of half and full adders.
// No stage can carry out of its top cell (x*y < 2^24, each s < 2^18); the
// module asserts this.
//
// The block split, the two 18-bit adders, the final 24-bit adder and the
// 6-bit shifts follow the published structure; the ripple-carry adders
// are this design's choice.
//
// Interface: x, y are the 12-bit operands, p = x * y is the 24-bit product.
// Purely combinational; no clock, no reset. Register the inputs and the
// output outside if a pipelined multiplier is wanted.
module mult12x12 (
  input  logic [11:0] x,
  input  logic [11:0] y,
  output logic [23:0] p
);
  logic [11:0] p_ll, p_lh, p_hl, p_hh;   // x block, y block: l = low, h = high
  logic [17:0] s1, s2;
  logic        c1, c2, c3;

  mult6x6 u_m_ll (.x(x[5:0]),  .y(y[5:0]),  .p(p_ll));
  mult6x6 u_m_lh (.x(x[5:0]),  .y(y[11:6]), .p(p_lh));
  mult6x6 u_m_hl (.x(x[11:6]), .y(y[5:0]),  .p(p_hl));
  mult6x6 u_m_hh (.x(x[11:6]), .y(y[11:6]), .p(p_hh));

  shift_adder #(.WA(12), .WB(12), .SHIFT(6)) u_add_s1 (
    .a(p_ll), .b(p_lh), .sum(s1), .cout(c1)
  );
  shift_adder #(.WA(12), .WB(12), .SHIFT(6)) u_add_s2 (
    .a(p_hl), .b(p_hh), .sum(s2), .cout(c2)
  );
  shift_adder #(.WA(18), .WB(18), .SHIFT(6)) u_add_p (
    .a(s1), .b(s2), .sum(p), .cout(c3)
  );

  // A product of 12-bit numbers fits in 24 bits: no stage overflows.
  always_comb begin
    assert final (!(c1 || c2 || c3))
      else $error("mult12x12: carry out of a summation stage");
  end
endmodule
