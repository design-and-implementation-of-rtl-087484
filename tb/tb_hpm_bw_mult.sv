// tb_hpm_bw_mult -- end-to-end test of the multiplier at its default size
// (8 x 8 bits, no parameter override).
//
// Runs every operand pair in both modes (2 x 65,536 products), alternating
// the mode from one product to the next, and compares p with the
// simulator's own unsigned or signed multiply. It also counts how often each
// behaviour of the design was exercised and fails if one never was:
// unsigned and signed products, a change of mode, negative signed results,
// the most-negative operand, and unsigned products that reach the top bit.
module tb_hpm_bw_mult;
  logic [7:0]  a, b;
  logic        tc;
  logic [15:0] p;
  logic        last_tc;
  int checks = 0, failures = 0;
  int n_unsigned = 0, n_signed = 0, n_switch = 0, n_negative = 0,
      n_min_operand = 0, n_top_bit = 0;

  hpm_bw_mult dut (.a, .b, .tc, .p);

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_count(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL never exercised: %s", what);
    end else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    logic [15:0] exp;
    last_tc = 1'b0;
    for (int v = 0; v < 65536; v++) begin
      for (int m = 0; m < 2; m++) begin
        a  = v[15:8];
        b  = v[7:0];
        tc = m[0] ^ v[0];             // mode order alternates per operand pair
        #1;
        if (tc) exp = 16'($signed(a) * $signed(b));
        else    exp = 16'(int'(a) * int'(b));
        checks++;
        if (p !== exp) begin
          failures++;
          if (failures < 10)
            $display("FAIL a=%h b=%h tc=%0b p=%h expected %h", a, b, tc, p, exp);
        end
        if (tc) n_signed++; else n_unsigned++;
        if (tc != last_tc) n_switch++;
        last_tc = tc;
        if (tc && exp[15]) n_negative++;
        if (tc && (a == 8'h80 || b == 8'h80)) n_min_operand++;
        if (!tc && exp[15]) n_top_bit++;
      end
    end
    expect_count("unsigned products", n_unsigned);
    expect_count("signed products", n_signed);
    expect_count("mode switches", n_switch);
    expect_count("negative signed results", n_negative);
    expect_count("most-negative operand", n_min_operand);
    expect_count("unsigned results with bit 15", n_top_bit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
