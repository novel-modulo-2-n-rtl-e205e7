// End-to-end testbench of the modulo 2^n+1 multiplier at its default size.
// Leaves every parameter of the unit at its default (n = 4, modulus 17) and
// applies all 17 x 17 residue pairs, comparing each result with (a*b) mod 17
// computed in integers. It counts how often each mechanism of the design is
// exercised and fails if one never is: the inner subtraction X - Y staying
// non-negative, going negative (borrow and +1 correction), and landing on
// exactly -1 (the MSB multiplexer taking the adder's carry out); a zero
// operand; an operand equal to 2^n, which needs the (n+1)-th bit; and a
// result equal to 2^n.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_mod2n1_mul;
  localparam int unsigned N = mod2n1_pkg::N_DEFAULT;
  localparam int M = (1 << N) + 1;

  logic [N:0] a, b, r;
  int checks = 0, failures = 0;
  int n_nonneg = 0, n_neg = 0, n_wrap = 0, n_zero_op = 0, n_top_op = 0, n_top_res = 0;

  mod2n1_mul dut (.a(a), .b(b), .r(r));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, x, y;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++) begin
        a = (N+1)'(i);
        b = (N+1)'(j);
        #1;
        e = (i * j) % M;
        x = (i * j) % (1 << N);
        y = (i * j) >> N;
        if (x >= y) n_nonneg++;
        else n_neg++;
        if (x - y == -1) n_wrap++;
        if (i == 0 || j == 0) n_zero_op++;
        if (i == M - 1 || j == M - 1) n_top_op++;
        if (e == M - 1) n_top_res++;
        checks++;
        if (int'(r) != e) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d got %0d expected %0d", i, j, r, e);
        end
      end
    $display("mechanisms: nonneg=%0d borrow=%0d wrap=%0d zero_op=%0d top_op=%0d top_res=%0d",
             n_nonneg, n_neg, n_wrap, n_zero_op, n_top_op, n_top_res);
    if (n_nonneg == 0 || n_neg == 0 || n_wrap == 0 || n_zero_op == 0 || n_top_op == 0 || n_top_res == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
