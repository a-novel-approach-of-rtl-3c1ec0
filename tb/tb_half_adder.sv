// tb_half_adder: exhaustive self-check of the half adder. All four input
// pairs are applied, one per time step, and {c, s} is compared with the
// arithmetic sum a + b. A watchdog ends the run as a failure if it hangs.
module tb_half_adder;
  logic a, b, s, c;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .s(s), .c(c));

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({c, s} != 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%0d b=%0d -> c=%0d s=%0d", a, b, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
