// des_pperm: permutation P applied to the S-box outputs (32 -> 32 bits).
//
// Combinational bit selection, published DES table P. Its output is XORed
// with the left half to give the new right half.
module des_pperm
  import des_pkg::*;
(
  input  half_t din,
  output half_t dout
);
  always_comb dout = permute_p(din);
endmodule
