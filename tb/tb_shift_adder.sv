// tb_shift_adder: self-check of the shift-and-add adder in the four shapes
// the multipliers use: 6+6<<3 (default parameters), 9+9<<3, 12+12<<6 and
// 18+18<<6. The small shapes are swept exhaustively; the wide ones get
// corner values and random operands. Each sum, and the carry out of the top
// cell, is compared with a + (b << SHIFT) computed in 64-bit arithmetic.
// A watchdog ends a hung run as a failure.
module tb_shift_adder;
  int checks = 0, failures = 0;

  // shape 0: default parameters, 6-bit + 6-bit << 3
  logic [5:0]  a0, b0;  logic [8:0]  s0;  logic c0;
  // shape 1: 9-bit + 9-bit << 3
  logic [8:0]  a1, b1;  logic [11:0] s1;  logic c1;
  // shape 2: 12-bit + 12-bit << 6
  logic [11:0] a2, b2;  logic [17:0] s2;  logic c2;
  // shape 3: 18-bit + 18-bit << 6
  logic [17:0] a3, b3;  logic [23:0] s3;  logic c3;

  shift_adder dut0 (.a(a0), .b(b0), .sum(s0), .cout(c0));
  shift_adder #(.WA(9),  .WB(9),  .SHIFT(3)) dut1 (.a(a1), .b(b1), .sum(s1), .cout(c1));
  shift_adder #(.WA(12), .WB(12), .SHIFT(6)) dut2 (.a(a2), .b(b2), .sum(s2), .cout(c2));
  shift_adder #(.WA(18), .WB(18), .SHIFT(6)) dut3 (.a(a3), .b(b3), .sum(s3), .cout(c3));

  function automatic void check(string tag, longint unsigned a, longint unsigned b,
                                int shift, int wo, longint unsigned sum, logic cout);
    longint unsigned want;
    want = a + (b << shift);
    checks++;
    if (sum != (want & ((64'd1 << wo) - 1)) || cout != want[wo]) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%0d b=%0d -> sum=%0d cout=%0d want %0d", tag, a, b, sum, cout, want);
    end
  endfunction

  initial begin
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        a0 = 6'(i); b0 = 6'(j); #1;
        check("6+6<<3", a0, b0, 3, 9, s0, c0);
      end
    for (int i = 0; i < 512; i++)
      for (int j = 0; j < 512; j += 7) begin
        a1 = 9'(i); b1 = 9'(j); #1;
        check("9+9<<3", a1, b1, 3, 12, s1, c1);
      end
    a1 = '1; b1 = '1; #1; check("9+9<<3", a1, b1, 3, 12, s1, c1);
    for (int k = 0; k < 20000; k++) begin
      a2 = 12'($urandom); b2 = 12'($urandom);
      a3 = 18'($urandom); b3 = 18'($urandom);
      if (k == 0) begin a2 = '1; b2 = '1; a3 = '1; b3 = '1; end
      if (k == 1) begin a2 = '0; b2 = '0; a3 = '0; b3 = '0; end
      if (k == 2) begin a2 = 12'hFC0; b2 = 12'h03F; a3 = 18'h3FFC0; b3 = 18'h00FFF; end
      #1;
      check("12+12<<6", a2, b2, 6, 18, s2, c2);
      check("18+18<<6", a3, b3, 6, 24, s3, c3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
