// (N+1) x (N+1) binary multiplier of the modulo 2^n+1 multiplier.
//
// Forms the plain product p = a * b of two residues a, b in 0..2^N. Since
// both are at most 2^N the product is at most 2^(2N) and fits in the 2N+1
// bits r_0 .. r_2N that are brought out; the 2N+2-th bit of the full product
// is always zero for valid residues and is dropped (it is the one unused
// bit a linter reports). Written with the multiplication operator; the
// partial-product array is left to synthesis, which is this design's choice.
// Purely combinational.
module bin_mult #(
  parameter int unsigned N = mod2n1_pkg::N_DEFAULT
) (
  input  logic [N:0]   a,
  input  logic [N:0]   b,
  output logic [2*N:0] p
);
  logic [2*N+1:0] full;

  always_comb begin
    full = a * b;
    p    = full[2*N:0];
  end
endmodule
