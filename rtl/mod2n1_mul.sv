// Modulo 2^n+1 multiplier on normal-representation residues.
//
// Computes r = |a * b| mod (2^n+1) for residues a, b in 0..2^n (N+1 bits
// each), with r in 0..2^n. Because 2^n = -1 modulo 2^n+1, the binary product
// P = X + 2^n * Y reduces to |X - Y|, where X = P[N-1:0] is the low n bits
// and Y = P[2N:N] the upper n+1 bits. The unit is therefore an (N+1)x(N+1)
// binary multiplier followed by the modulo 2^n+1 subtractor; X is widened to
// N+1 bits with a zero MSB so that both subtractor operands have the same
// width. X is at most 2^n - 1 and Y at most 2^n, so both are valid residues
// and the subtractor's result is exact. Zero operands need no special
// handling, unlike in the diminished-one representation.
// Inputs outside 0..2^n give undefined results. Purely combinational: the
// delay is one multiplier plus one subtractor.
module mod2n1_mul #(
  parameter int unsigned N = mod2n1_pkg::N_DEFAULT
) (
  input  logic [N:0] a,
  input  logic [N:0] b,
  output logic [N:0] r
);
  logic [2*N:0] p;
  logic [N:0]   x, y;

  bin_mult #(.N(N)) u_mult (.a(a), .b(b), .p(p));

  always_comb begin
    x = {1'b0, p[N-1:0]};
    y = p[2*N:N];
  end

  mod2n1_sub #(.N(N)) u_msub (.a(x), .b(y), .c(r));
endmodule
