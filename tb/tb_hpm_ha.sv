// tb_hpm_ha -- exhaustive check of the half-adder cell: for all four input
// pairs, {co, s} must equal the arithmetic sum a + b.
module tb_hpm_ha;
  logic a, b, s, co;
  int checks = 0, failures = 0;

  hpm_ha dut (.a, .b, .s, .co);

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({co, s} != 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> co=%0b s=%0b", a, b, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
