// Binary adder of the modulo 2^n+1 subtractor.
//
// Adds a one-bit carry-in to an (N+1)-bit operand: {cout, sum} = a + cin.
// In the subtractor the carry-in is the borrow of the binary subtractor, so
// a negative difference is corrected by +1 (since -(2^n+1) = -2^(n+1) + 2^n - 1,
// adding 1 and then dropping the 2^n weight turns the two's complement
// result into the residue). The carry out is kept for the MSB multiplexer.
// Purely combinational.
module bin_add #(
  parameter int unsigned N = mod2n1_pkg::N_DEFAULT
) (
  input  logic [N:0] a,
  input  logic       cin,
  output logic [N:0] sum,
  output logic       cout
);
  always_comb {cout, sum} = {1'b0, a} + {{(N+1){1'b0}}, cin};
endmodule
