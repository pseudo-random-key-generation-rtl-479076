// des_ip_inv: inverse initial permutation IP^-1 of the DES block.
//
// Combinational bit selection that undoes des_ip. The round engine feeds it
// the pre-output {R16, L16} after the last round and registers its output as
// the cipher (or recovered plain) text. The table is the published DES IP^-1.
module des_ip_inv
  import des_pkg::*;
(
  input  block_t din,
  output block_t dout
);
  always_comb dout = permute_64(din, IPINV_T);
endmodule
