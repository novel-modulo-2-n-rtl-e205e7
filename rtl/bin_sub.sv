// Binary subtractor of the modulo 2^n+1 subtractor.
//
// Subtracts two (N+1)-bit unsigned operands in plain two's complement:
// diff = (a - b) mod 2^(N+1), and borrow = 1 exactly when a < b. The borrow
// both tells the following stage that the result went negative and is the
// +1 it has to add. Written with the language's subtraction operator; the
// carry structure is left to synthesis, which is this design's choice.
// Purely combinational.
module bin_sub #(
  parameter int unsigned N = mod2n1_pkg::N_DEFAULT
) (
  input  logic [N:0] a,
  input  logic [N:0] b,
  output logic [N:0] diff,
  output logic       borrow
);
  always_comb {borrow, diff} = {1'b0, a} - {1'b0, b};
endmodule
