// tb_hpm_fa -- exhaustive check of the full-adder cell: for all eight input
// combinations, {co, s} must equal the arithmetic sum a + b + ci.
module tb_hpm_fa;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  hpm_fa dut (.a, .b, .ci, .s, .co);

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      #1;
      checks++;
      if ({co, s} != 2'(int'(a) + int'(b) + int'(ci))) begin
        failures++;
        $display("FAIL a=%0b b=%0b ci=%0b -> co=%0b s=%0b", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
