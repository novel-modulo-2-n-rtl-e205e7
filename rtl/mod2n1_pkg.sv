// Shared constants of the modulo 2^n+1 arithmetic units.
//
// Residues are kept in the normal (plain binary) representation: a residue
// of modulus 2^n+1 lies in 0..2^n and needs n+1 bits. N_DEFAULT is the word
// parameter n every unit starts from; 4 (modulus 17) is the size used in the
// worked example of the subtractor. Any n from 2 upwards works; the delay
// study behind this design covers n = 3 to 14.
package mod2n1_pkg;
  localparam int unsigned N_DEFAULT = 4;
endpackage
