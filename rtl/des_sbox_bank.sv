// des_sbox_bank: the eight S-boxes S1..S8 side by side (48 -> 32 bits).
//
// Combinational. The 48-bit word (expanded right half XOR subkey) is cut
// into eight 6-bit groups, most significant group into S1; each box returns
// 4 bits and the eight nibbles form the 32-bit word, S1's nibble on top.
module des_sbox_bank
  import des_pkg::*;
(
  input  subkey_t din,
  output half_t   dout
);
  for (genvar g = 0; g < 8; g++) begin : g_box
    des_sbox #(.BOX(g)) u_sbox (
      .din  (din[47-6*g -: 6]),
      .dout (dout[31-4*g -: 4])
    );
  end
endmodule
