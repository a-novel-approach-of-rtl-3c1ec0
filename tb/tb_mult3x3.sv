// tb_mult3x3: exhaustive self-check of the 3x3 decoder multiplier. All 64
// operand pairs of the truth table are applied, one per time step, and the
// 6-bit output is compared with x * y computed by the simulator's own
// arithmetic. A watchdog ends a hung run as a failure.
module tb_mult3x3;
  logic [2:0] x, y;
  logic [5:0] p;
  int checks = 0, failures = 0;

  mult3x3 dut (.x(x), .y(y), .p(p));

  initial begin
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < 8; j++) begin
        x = 3'(i);
        y = 3'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          $display("FAIL %0d * %0d -> %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
