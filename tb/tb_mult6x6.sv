// tb_mult6x6: exhaustive self-check of the 6x6 multiplier. All 4096 operand
// pairs are applied, one per time step, and the 12-bit product is compared
// with x * y from the simulator's arithmetic. It also counts how often a
// carry crosses from the overlapping bits into the upper bits of each of the
// three summation stages, worked out from the operands alone, and fails if a
// stage never sees one. A watchdog ends a hung run as a failure.
module tb_mult6x6;
  logic [5:0]  x, y;
  logic [11:0] p;
  int checks = 0, failures = 0;
  int carry_s1 = 0, carry_s2 = 0, carry_p = 0;

  mult6x6 dut (.x(x), .y(y), .p(p));

  initial begin
    int xl, xh, yl, yh, s1, s2;
    for (int i = 0; i < 64; i++) begin
      for (int j = 0; j < 64; j++) begin
        x = 6'(i);
        y = 6'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d -> %0d", i, j, p);
        end
        xl = i % 8; xh = i / 8; yl = j % 8; yh = j / 8;
        s1 = xl * yl + 8 * (xl * yh);
        s2 = xh * yl + 8 * (xh * yh);
        if ((xl * yl) / 8 + (xl * yh) % 8 >= 8) carry_s1++;
        if ((xh * yl) / 8 + (xh * yh) % 8 >= 8) carry_s2++;
        if (s1 / 8 + s2 % 64 >= 64) carry_p++;
      end
    end
    $display("overlap carries: s1=%0d s2=%0d p=%0d", carry_s1, carry_s2, carry_p);
    checks += 3;
    if (carry_s1 == 0) failures++;
    if (carry_s2 == 0) failures++;
    if (carry_p == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
