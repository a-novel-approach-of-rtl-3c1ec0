// tb_mult12x12: end-to-end self-check of the 12x12 multiplier at its
// default (and only) size.
//
// Stimulus, one operand pair per time step: all 2^24 operand pairs, x in
// the outer loop and y in the inner one (about 20 s of simulation).
// Each 24-bit product is compared with x * y from the simulator's own
// arithmetic. From the operands alone the bench also works out, and counts,
// the cases that exercise each mechanism of the design: a carry crossing
// from the overlapping bits into the upper half-adder bits of each of the
// three shift-and-add stages (s1, s2, final), a zero operand, and the
// largest product (4095 * 4095). A mechanism that never occurred is a
// failure. A watchdog ends a hung run as a failure.
module tb_mult12x12;
  logic [11:0] x, y;
  logic [23:0] p;
  int checks = 0, failures = 0;
  int n_carry_s1 = 0, n_carry_s2 = 0, n_carry_p = 0, n_zero = 0, n_full = 0;

  mult12x12 dut (.x(x), .y(y), .p(p));

  task automatic apply(input int xi, input int yi);
    int xl, xh, yl, yh, s1, s2;
    x = 12'(xi);
    y = 12'(yi);
    #1;
    checks++;
    if (int'(p) != xi * yi) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d -> %0d", xi, yi, p);
    end
    xl = xi % 64; xh = xi / 64; yl = yi % 64; yh = yi / 64;
    s1 = xl * yl + 64 * (xl * yh);
    s2 = xh * yl + 64 * (xh * yh);
    if ((xl * yl) / 64 + (xl * yh) % 64 >= 64) n_carry_s1++;
    if ((xh * yl) / 64 + (xh * yh) % 64 >= 64) n_carry_s2++;
    if (s1 / 64 + s2 % 4096 >= 4096) n_carry_p++;
    if (xi == 0 || yi == 0) n_zero++;
    if (xi == 4095 && yi == 4095) n_full++;
  endtask

  initial begin
    for (int i = 0; i < 4096; i++)
      for (int j = 0; j < 4096; j++)
        apply(i, j);

    $display("mechanisms: carry_s1=%0d carry_s2=%0d carry_p=%0d zero=%0d full_scale=%0d",
             n_carry_s1, n_carry_s2, n_carry_p, n_zero, n_full);
    checks += 5;
    if (n_carry_s1 == 0) failures++;
    if (n_carry_s2 == 0) failures++;
    if (n_carry_p == 0) failures++;
    if (n_zero == 0) failures++;
    if (n_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
