// Modulo 2^n+1 subtractor on normal-representation residues.
//
// Computes c = |a - b| mod (2^n+1) for residues a, b in 0..2^n, each N+1
// bits wide, with c in 0..2^n. Three parts, as in the original structure:
//   1. a binary subtractor forms d = a - b on N+1 bits and its borrow;
//   2. a binary adder adds the borrow: s = d + borrow, with carry out cout;
//   3. a multiplexer sets the MSB of the result: s[N] when there was no
//      borrow, cout when there was.
// If a >= b the result is d itself (the adder adds 0, cout is 0). If a < b,
// d + 1 = a - b + 1 + 2^(N+1) lies in 2^N+1 .. 2^(N+1), and the residue is
// that value less 2^N: for every case but a - b = -1 this means clearing
// bit N, and for a - b = -1 the adder wraps to zero with cout = 1 and the
// result must be 2^N. Taking the MSB from cout covers both. The original
// description states the rule only for the wrapping case; using the borrow
// as the select line is this design's reading of it.
// Inputs outside 0..2^n give undefined results. Purely combinational.
module mod2n1_sub #(
  parameter int unsigned N = mod2n1_pkg::N_DEFAULT
) (
  input  logic [N:0] a,
  input  logic [N:0] b,
  output logic [N:0] c
);
  logic [N:0] diff, sum;
  logic       borrow, cout, msb;

  bin_sub #(.N(N)) u_sub (.a(a), .b(b), .diff(diff), .borrow(borrow));
  bin_add #(.N(N)) u_add (.a(diff), .cin(borrow), .sum(sum), .cout(cout));
  msb_mux #(.W(1)) u_mux (.d0(sum[N]), .d1(cout), .sel(borrow), .y(msb));

  always_comb c = {msb, sum[N-1:0]};
endmodule
