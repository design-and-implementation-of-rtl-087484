// tb_hpm_bw_mult4 -- the 4 x 4-bit configuration of the multiplier, tested
// exhaustively: all 256 operand pairs in both modes against the simulator's
// unsigned and signed multiply.
module tb_hpm_bw_mult4;
  logic [3:0] a, b;
  logic       tc;
  logic [7:0] p;
  int checks = 0, failures = 0;

  hpm_bw_mult #(.N(4)) dut (.a, .b, .tc, .p);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp;
    for (int v = 0; v < 512; v++) begin
      {tc, a, b} = 9'(v);
      #1;
      if (tc) exp = 8'($signed(a) * $signed(b));
      else    exp = 8'(int'(a) * int'(b));
      checks++;
      if (p !== exp) begin
        failures++;
        $display("FAIL a=%h b=%h tc=%0b p=%h expected %h", a, b, tc, p, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
