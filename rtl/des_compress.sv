// des_compress: compression permutation, 64-bit generator state -> 48-bit
// subkey.
//
// Combinational. The 64 bits of the pseudo random key generator are reduced
// in two fixed bit selections: DES permuted choice 1 (drops every eighth bit,
// 64 -> 56) followed by permuted choice 2 (56 -> 48). The compression step
// itself follows the design; using the two DES key-schedule tables for its
// bit allocation is this implementation's choice, as the exact selection is
// not specified.
module des_compress
  import des_pkg::*;
(
  input  key_t    din,
  output subkey_t dout
);
  always_comb dout = pc2(pc1(din));
endmodule
