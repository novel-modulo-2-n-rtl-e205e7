// Checking harness shared by the modulo 2^n+1 testbenches.
//
// Instantiates one unit of word parameter N (the subtractor when MUL = 0,
// the multiplier when MUL = 1) and drives it one operand pair per time unit.
// With EXHAUSTIVE = 1 it applies every pair of residues 0..2^N; otherwise it
// applies the corner pairs (0, 1, 2^N-1, 2^N in every combination) and then
// RANDOM_PAIRS uniformly random pairs. Each result is compared with a
// reference computed with 64-bit integer arithmetic, independent of the unit.
// It also counts how often each path of the subtractor is taken: the
// subtraction not going negative, going negative, and going to exactly -1
// (where the MSB comes from the adder's carry out); and zero operands,
// operands of 2^N, and results of 2^N. `done` rises when all pairs are done.
module mod_checker #(
  parameter int unsigned N            = 4,
  parameter bit          MUL          = 1'b0,
  parameter bit          EXHAUSTIVE   = 1'b1,
  parameter int unsigned RANDOM_PAIRS = 1000
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_nonneg,
  output int   n_neg,
  output int   n_wrap,
  output int   n_zero_op,
  output int   n_top_op,
  output int   n_top_res
);
  localparam longint M = (64'd1 << N) + 64'd1;

  logic [N:0] a, b, r;
  bit finished = 1'b0;

  assign done = finished;

  if (MUL) begin : g_mul
    mod2n1_mul #(.N(N)) dut (.a(a), .b(b), .r(r));
  end else begin : g_sub
    mod2n1_sub #(.N(N)) dut (.a(a), .b(b), .c(r));
  end

  task automatic apply(input longint ea, input longint eb);
    longint exp_r, u, v;
    a = (N+1)'(ea);
    b = (N+1)'(eb);
    #1;
    if (MUL) begin
      // Subtractor operands as the multiplier forms them.
      u = (ea * eb) % (64'd1 << N);
      v = (ea * eb) >> N;
      exp_r = (ea * eb) % M;
    end else begin
      u = ea;
      v = eb;
      exp_r = ((ea - eb) % M + M) % M;
    end
    if (u >= v) n_nonneg++;
    else n_neg++;
    if (u - v == -1) n_wrap++;
    if (ea == 0 || eb == 0) n_zero_op++;
    if (ea == M - 1 || eb == M - 1) n_top_op++;
    if (exp_r == M - 1) n_top_res++;
    checks++;
    if (longint'(r) != exp_r) begin
      failures++;
      if (failures < 10)
        $display("FAIL N=%0d %s a=%0d b=%0d got %0d expected %0d",
                 N, MUL ? "mul" : "sub", ea, eb, r, exp_r);
    end
  endtask

  initial begin
    longint corner [4];
    checks = 0; failures = 0;
    n_nonneg = 0; n_neg = 0; n_wrap = 0;
    n_zero_op = 0; n_top_op = 0; n_top_res = 0;
    a = '0; b = '0;
    if (EXHAUSTIVE) begin
      for (longint i = 0; i < M; i++)
        for (longint j = 0; j < M; j++)
          apply(i, j);
    end else begin
      corner = '{0, 1, M - 2, M - 1};
      foreach (corner[i])
        foreach (corner[j])
          apply(corner[i], corner[j]);
      for (int unsigned k = 0; k < RANDOM_PAIRS; k++)
        apply(longint'($urandom) % M, longint'($urandom) % M);
    end
    finished = 1'b1;
  end
endmodule
