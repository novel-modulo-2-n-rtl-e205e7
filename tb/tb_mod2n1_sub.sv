// Self-checking testbench of mod2n1_sub.
// Checks every pair of residues at the default n = 4 (modulus 17) directly,
// including the worked case 0 - 1 = 16, and, through the shared checking
// harness, every pair at n = 3 (modulus 9) and n = 8 (modulus 257). Each of
// the subtractor's paths (no borrow, borrow, borrow with the adder wrapping
// to zero) must be taken at least once at every size.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_mod2n1_sub;
  localparam int unsigned N = mod2n1_pkg::N_DEFAULT;
  localparam int M = (1 << N) + 1;

  logic [N:0] a, b, c;
  int checks = 0, failures = 0;
  int n_neg = 0, n_wrap = 0;

  mod2n1_sub dut (.a(a), .b(b), .c(c));

  logic done3, done8;
  int ck3, fl3, nn3, ng3, wr3, z3, t3, tr3;
  int ck8, fl8, nn8, ng8, wr8, z8, t8, tr8;

  mod_checker #(.N(3), .MUL(1'b0)) u_n3 (.done(done3), .checks(ck3), .failures(fl3),
    .n_nonneg(nn3), .n_neg(ng3), .n_wrap(wr3), .n_zero_op(z3), .n_top_op(t3), .n_top_res(tr3));
  mod_checker #(.N(8), .MUL(1'b0)) u_n8 (.done(done8), .checks(ck8), .failures(fl8),
    .n_nonneg(nn8), .n_neg(ng8), .n_wrap(wr8), .n_zero_op(z8), .n_top_op(t8), .n_top_res(tr8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    // Worked example: 0 - 1 mod 17 = 16 (binary 10000).
    a = '0; b = (N+1)'(1);
    #1;
    checks++;
    if (int'(c) != M - 1) begin
      failures++;
      $display("FAIL 0-1 gave %0d", c);
    end
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++) begin
        a = (N+1)'(i);
        b = (N+1)'(j);
        #1;
        e = ((i - j) % M + M) % M;
        if (i < j) n_neg++;
        if (i - j == -1) n_wrap++;
        checks++;
        if (int'(c) != e) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d a=%0d b=%0d got %0d expected %0d", N, i, j, c, e);
        end
      end
    if (n_neg == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL borrow path or wrap path never taken at N=%0d", N);
    end
    while (!(done3 && done8)) #10;
    checks += ck3 + ck8;
    failures += fl3 + fl8;
    if (ng3 == 0 || wr3 == 0 || nn3 == 0 || ng8 == 0 || wr8 == 0 || nn8 == 0 ||
        z3 == 0 || t3 == 0 || tr3 == 0 || z8 == 0 || t8 == 0 || tr8 == 0) begin
      failures++;
      $display("FAIL a subtractor path or corner operand never occurred at N=3 or N=8");
    end
    $display("N=3: %0d pairs, N=8: %0d pairs", ck3, ck8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
