// des_sbox: one 6-to-4-bit DES substitution box.
//
// Combinational table look-up. Parameter BOX selects S1..S8 (0..7). Input
// bits 1 and 6 (x[5], x[0]) select the row, bits 2..5 (x[4:1]) the column of
// the published DES S-box table held in des_pkg.
module des_sbox
  import des_pkg::*;
#(
  parameter int unsigned BOX = 0
) (
  input  logic [5:0] din,
  output logic [3:0] dout
);
  always_comb dout = sbox(3'(BOX), din);
endmodule
