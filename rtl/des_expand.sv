// des_expand: expansion permutation E (32 -> 48 bits).
//
// Combinational. Each 4-bit group of the right half is widened to 6 bits by
// repeating its neighbours' edge bits, so the result lines up with the
// 48-bit subkey for the XOR in front of the S-boxes. Table: published DES E.
module des_expand
  import des_pkg::*;
(
  input  half_t   din,
  output subkey_t dout
);
  always_comb dout = expand_32_48(din);
endmodule
