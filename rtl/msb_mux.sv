// Output multiplexer of the modulo 2^n+1 subtractor.
//
// A 2-to-1 multiplexer of width W: y = sel ? d1 : d0. In the subtractor it
// picks the most significant (2^n) bit of the result: the adder's MSB when
// the difference was not negative, and the adder's carry out when it was.
// Purely combinational.
module msb_mux #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  input  logic         sel,
  output logic [W-1:0] y
);
  always_comb y = sel ? d1 : d0;
endmodule
