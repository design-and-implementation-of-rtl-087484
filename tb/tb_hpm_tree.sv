// tb_hpm_tree -- check of the HPM reduction tree on arbitrary bit matrices.
//
// The tree is a pure adder of weighted bits, so it is driven with random
// partial-product matrices (not only ones a multiplier could produce), plus
// all-ones and single-bit patterns, and random correction bits. Its output
// must equal the sum of pp[j][i] * 2^(i+j) + k_mid * 2^N + k_msb * 2^(2N-1)
// modulo 2^(2N). The default 8-bit tree and a 4-bit and 2-bit one are tested.
module tb_hpm_tree;
  int checks = 0, failures = 0;

  logic [7:0][7:0] pp8;  logic km8, kx8;  logic [15:0] p8;
  logic [3:0][3:0] pp4;  logic km4, kx4;  logic [7:0]  p4;
  logic [1:0][1:0] pp2;  logic km2, kx2;  logic [3:0]  p2;

  hpm_tree             dut8 (.pp(pp8), .k_mid(km8), .k_msb(kx8), .p(p8));
  hpm_tree #(.N(4))    dut4 (.pp(pp4), .k_mid(km4), .k_msb(kx4), .p(p4));
  hpm_tree #(.N(2))    dut2 (.pp(pp2), .k_mid(km2), .k_msb(kx2), .p(p2));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: weighted population sum, computed in 64-bit integers.
  function automatic longint unsigned wsum(int n, logic [63:0] m, logic km, logic kx);
    longint unsigned s = 0;
    for (int j = 0; j < n; j++)
      for (int i = 0; i < n; i++)
        if (m[j*n + i]) s += 64'd1 << (i + j);
    if (km) s += 64'd1 << n;
    if (kx) s += 64'd1 << (2*n - 1);
    return s & ((64'd1 << (2*n)) - 1);
  endfunction

  task automatic check(int n, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL N=%0d got %h expected %h", n, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 20000; t++) begin
      logic [63:0] r;
      r = {$urandom, $urandom};
      if (t == 0) r = '1;                       // every input set
      else if (t == 1) r = '0;
      else if (t < 66) r = 64'd1 << (t - 2);    // each single bit
      pp8 = r;        km8 = $urandom;  kx8 = $urandom;
      pp4 = r[15:0];  km4 = $urandom;  kx4 = $urandom;
      pp2 = r[3:0];   km2 = $urandom;  kx2 = $urandom;
      if (t < 2) {km8, kx8, km4, kx4, km2, kx2} = t[0] ? '0 : '1;
      #1;
      check(8, p8, wsum(8, 64'(pp8), km8, kx8));
      check(4, p4, wsum(4, 64'(pp4), km4, kx4));
      check(2, p2, wsum(2, 64'(pp2), km2, kx2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
