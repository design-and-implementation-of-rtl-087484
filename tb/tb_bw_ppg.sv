// tb_bw_ppg -- check of the Baugh-Wooley partial-product generator at N = 8.
//
// For random operands in both modes, every partial-product bit is compared
// with a_i & b_j, inverted when exactly one of i, j is the sign position and
// the operands are signed, and the correction bits with the mode. As a second,
// independent check, the weighted sum of all the generator's bits (mod 2^16)
// must equal the product computed with the simulator's own signed or
// unsigned multiply.
module tb_bw_ppg;
  localparam int N = 8;
  logic [N-1:0]        a, b;
  logic                tc;
  logic [N-1:0][N-1:0] pp;
  logic                k_mid, k_msb;
  int checks = 0, failures = 0;

  bw_ppg #(.N(N)) dut (.a, .b, .tc, .pp, .k_mid, .k_msb);

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2*N-1:0] ref_product(logic [N-1:0] x, logic [N-1:0] y, logic s);
    if (s) return (2*N)'($signed(x) * $signed(y));
    return (2*N)'(int'(x) * int'(y));
  endfunction

  initial begin
    logic exp_bit;
    logic [2*N-1:0] acc;
    for (int t = 0; t < 4000; t++) begin
      a  = N'($urandom);
      b  = N'($urandom);
      tc = t[0];
      if (t < 8) begin  // corner operands first
        a = (t < 4) ? '1 : {1'b1, {(N-1){1'b0}}};
        b = (t[1]) ? '1 : {1'b1, {(N-1){1'b0}}};
      end
      #1;
      acc = '0;
      for (int j = 0; j < N; j++) begin
        for (int i = 0; i < N; i++) begin
          exp_bit = a[i] & b[j];
          if (tc && ((i == N - 1) ^ (j == N - 1))) exp_bit = !exp_bit;
          checks++;
          if (pp[j][i] !== exp_bit) begin
            failures++;
            $display("FAIL pp[%0d][%0d] a=%h b=%h tc=%0b", j, i, a, b, tc);
          end
          if (pp[j][i]) acc += (2*N)'(1) << (i + j);
        end
      end
      checks++;
      if (k_mid !== tc || k_msb !== tc) begin
        failures++;
        $display("FAIL correction bits %0b %0b tc=%0b", k_mid, k_msb, tc);
      end
      if (k_mid) acc += (2*N)'(1) << N;
      if (k_msb) acc += (2*N)'(1) << (2*N - 1);
      checks++;
      if (acc !== ref_product(a, b, tc)) begin
        failures++;
        $display("FAIL weighted sum %h expected %h (a=%h b=%h tc=%0b)",
                 acc, ref_product(a, b, tc), a, b, tc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
