// des_ip: initial permutation IP of the DES block.
//
// Purely combinational bit selection (no logic gates, only wiring): standard
// DES bit i of dout is bit IP[i] of din. dout[63:32] is the left half and
// dout[31:0] the right half that are loaded into the round engine's
// left-half and right-half registers. The table is the published DES IP;
// the engine uses it unchanged.
module des_ip
  import des_pkg::*;
(
  input  block_t din,
  output block_t dout
);
  always_comb dout = permute_64(din, IP_T);
endmodule
