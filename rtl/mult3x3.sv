// mult3x3: 3-bit by 3-bit unsigned multiplier built as a decoder, not as an
// array of adders.
//
// How it works: the 64 possible products of two 3-bit numbers are laid out
// as a truth table, in the way a BCD to seven-segment decoder has one
// output column per segment. Here each of the six product bits A5..A0 is
// one column, and each column is reduced by a Karnaugh map to a
// sum of products of the inputs X2..X0, Y2..Y0. The module is those six
// two-level functions; there is no carry chain.
//
// A0, A1 and A2 are the published minimised functions. A3, A4 and A5 are
// minimal sums of products derived for this design from the same truth
// table (the method is the same; the particular terms are this design's).
//
// Interface: x, y are the 3-bit operands, p = x * y is the 6-bit product.
// Purely combinational; no clock, no reset.
module mult3x3 (
  input  logic [2:0] x,
  input  logic [2:0] y,
  output logic [5:0] p
);
  logic x0, x1, x2, y0, y1, y2;
  logic nx0, nx1, nx2, ny0, ny1, ny2;

  always_comb begin
    {x2, x1, x0} = x;
    {y2, y1, y0} = y;
    {nx2, nx1, nx0} = ~x;
    {ny2, ny1, ny0} = ~y;

    p[0] = x0 & y0;

    p[1] = (x1 & nx0 & y0) | (x1 & ny1 & y0) | (x0 & y1 & ny0)
         | (nx1 & x0 & y1);

    p[2] = (x2 & x0 & ny2 & y0) | (x2 & nx0 & ny1 & y0)
         | (x2 & nx1 & nx0 & y0) | (x1 & nx0 & y1 & ny0)
         | (nx2 & x1 & nx0 & y1) | (x1 & ny2 & y1 & ny0)
         | (nx2 & x0 & y2 & y0)  | (x0 & y2 & ny1 & ny0)
         | (nx1 & x0 & y2 & ny0);

    p[3] = (x2 & x1 & x0 & y2 & ny0)        | (x1 & nx0 & y2 & ny1)
         | (x2 & nx1 & x0 & y2 & ny1 & y0)  | (x2 & nx1 & ny2 & y1)
         | (x2 & nx1 & y1 & ny0)            | (nx2 & x1 & x0 & ny2 & y1 & y0)
         | (nx2 & x1 & nx0 & y2)            | (x2 & nx0 & y2 & y1 & y0)
         | (nx2 & x1 & y2 & ny1)            | (x2 & ny2 & y1 & ny0);

    p[4] = (x2 & y2 & ny1 & ny0)      | (nx2 & x1 & x0 & y2 & y1)
         | (x2 & x1 & ny2 & y1 & y0)  | (x2 & nx0 & y2 & ny1)
         | (x2 & nx1 & y2 & ny0)      | (x1 & x0 & y2 & y1 & y0)
         | (x2 & nx1 & nx0 & y2)      | (x2 & nx1 & y2 & ny1);

    p[5] = (x2 & x1 & y2 & y1) | (x2 & x1 & x0 & y2 & y0)
         | (x2 & x0 & y2 & y1 & y0);
  end
endmodule
