// des_ref_pkg: bit-serial reference model of the engine for the testbenches.
//
// Written independently of the RTL tables where a table has a closed form:
// IP, IP^-1, E and PC-1 are generated from their row/column structure, IP^-1
// as the inverse of IP. P, PC-2 and the S-boxes are typed in as printed in
// the DES standard. Bit numbering follows the standard (bit 1 = MSB).
// Known-answer vectors in the testbenches guard the model itself.
package des_ref_pkg;

  typedef logic [15:0][47:0] keys16_t;   // [i] = KEY(i+1)

  localparam int unsigned RP [32] = '{16,7,20,21,29,12,28,17, 1,15,23,26,5,18,31,10,
                                      2,8,24,14,32,27,3,9, 19,13,30,6,22,11,4,25};
  localparam int unsigned RPC2 [48] = '{14,17,11,24,1,5, 3,28,15,6,21,10, 23,19,12,4,26,8,
                                        16,7,27,20,13,2, 41,52,31,37,47,55, 30,40,51,45,33,48,
                                        44,49,39,56,34,53, 46,42,50,36,29,32};
  // S-boxes, [box][row][column].
  localparam int unsigned RS [8][4][16] = '{
    '{'{14,4,13,1,2,15,11,8,3,10,6,12,5,9,0,7}, '{0,15,7,4,14,2,13,1,10,6,12,11,9,5,3,8},
      '{4,1,14,8,13,6,2,11,15,12,9,7,3,10,5,0}, '{15,12,8,2,4,9,1,7,5,11,3,14,10,0,6,13}},
    '{'{15,1,8,14,6,11,3,4,9,7,2,13,12,0,5,10}, '{3,13,4,7,15,2,8,14,12,0,1,10,6,9,11,5},
      '{0,14,7,11,10,4,13,1,5,8,12,6,9,3,2,15}, '{13,8,10,1,3,15,4,2,11,6,7,12,0,5,14,9}},
    '{'{10,0,9,14,6,3,15,5,1,13,12,7,11,4,2,8}, '{13,7,0,9,3,4,6,10,2,8,5,14,12,11,15,1},
      '{13,6,4,9,8,15,3,0,11,1,2,12,5,10,14,7}, '{1,10,13,0,6,9,8,7,4,15,14,3,11,5,2,12}},
    '{'{7,13,14,3,0,6,9,10,1,2,8,5,11,12,4,15}, '{13,8,11,5,6,15,0,3,4,7,2,12,1,10,14,9},
      '{10,6,9,0,12,11,7,13,15,1,3,14,5,2,8,4}, '{3,15,0,6,10,1,13,8,9,4,5,11,12,7,2,14}},
    '{'{2,12,4,1,7,10,11,6,8,5,3,15,13,0,14,9}, '{14,11,2,12,4,7,13,1,5,0,15,10,3,9,8,6},
      '{4,2,1,11,10,13,7,8,15,9,12,5,6,3,0,14}, '{11,8,12,7,1,14,2,13,6,15,0,9,10,4,5,3}},
    '{'{12,1,10,15,9,2,6,8,0,13,3,4,14,7,5,11}, '{10,15,4,2,7,12,9,5,6,1,13,14,0,11,3,8},
      '{9,14,15,5,2,8,12,3,7,0,4,10,1,13,11,6}, '{4,3,2,12,9,5,15,10,11,14,1,7,6,0,8,13}},
    '{'{4,11,2,14,15,0,8,13,3,12,9,7,5,10,6,1}, '{13,0,11,7,4,9,1,10,14,3,5,12,2,15,8,6},
      '{1,4,11,13,12,3,7,14,10,15,6,8,0,5,9,2}, '{6,11,13,8,1,4,10,7,9,5,0,15,14,2,3,12}},
    '{'{13,2,8,4,6,15,11,1,10,9,3,14,5,0,12,7}, '{1,15,13,8,10,3,7,4,12,5,6,11,0,14,9,2},
      '{7,11,4,1,9,12,14,2,0,6,10,13,15,3,5,8}, '{2,1,14,7,4,10,8,13,15,12,9,0,3,5,6,11}}};

  // Source bit (1-based) of IP output bit k (1-based).
  function automatic int unsigned ip_src(int unsigned k);
    int unsigned r = (k - 1) / 8, c = (k - 1) % 8;
    int unsigned base = (r < 4) ? 58 + 2 * r : 57 + 2 * (r - 4);
    return base - 8 * c;
  endfunction

  function automatic logic [63:0] ref_ip(logic [63:0] x);
    logic [63:0] y;
    for (int unsigned k = 1; k <= 64; k++) y[64-k] = x[64-ip_src(k)];
    return y;
  endfunction

  function automatic logic [63:0] ref_ip_inv(logic [63:0] x);
    logic [63:0] y;
    // IP moves bit ip_src(k) to k, so IP^-1 moves bit k back to ip_src(k).
    for (int unsigned k = 1; k <= 64; k++) y[64-ip_src(k)] = x[64-k];
    return y;
  endfunction

  function automatic logic [47:0] ref_e(logic [31:0] x);
    logic [47:0] y;
    for (int unsigned k = 0; k < 48; k++) begin
      int unsigned src = ((4 * (k / 6) + (k % 6) + 31) % 32) + 1;
      y[47-k] = x[32-src];
    end
    return y;
  endfunction

  function automatic logic [31:0] ref_p(logic [31:0] x);
    logic [31:0] y;
    for (int k = 0; k < 32; k++) y[31-k] = x[32-RP[k]];
    return y;
  endfunction

  function automatic logic [3:0] ref_s(int unsigned box, logic [5:0] x);
    int unsigned row = {x[5], x[0]};
    int unsigned col = x[4:1];
    return 4'(RS[box][row][col]);
  endfunction

  function automatic logic [31:0] ref_sbank(logic [47:0] x);
    logic [31:0] y;
    for (int b = 0; b < 8; b++) y[31-4*b -: 4] = ref_s(b, x[47-6*b -: 6]);
    return y;
  endfunction

  function automatic logic [31:0] ref_f(logic [31:0] r, logic [47:0] k);
    return ref_p(ref_sbank(ref_e(r) ^ k));
  endfunction

  function automatic int unsigned pc1_src(int unsigned k);  // k 0..55
    int unsigned h = k % 28, col = h / 8, row = h % 8;
    if (k < 28) return 57 + col - 8 * row;
    if (h < 24) return 63 - col - 8 * row;
    return 28 - 8 * (h - 24);
  endfunction

  function automatic logic [55:0] ref_pc1(logic [63:0] x);
    logic [55:0] y;
    for (int unsigned k = 0; k < 56; k++) y[55-k] = x[64-pc1_src(k)];
    return y;
  endfunction

  // A 64-bit word whose PC-1 is y (parity bits zero).
  function automatic logic [63:0] ref_pc1_preimage(logic [55:0] y);
    logic [63:0] x = '0;
    for (int unsigned k = 0; k < 56; k++) x[64-pc1_src(k)] = y[55-k];
    return x;
  endfunction

  function automatic logic [47:0] ref_pc2(logic [55:0] x);
    logic [47:0] y;
    for (int k = 0; k < 48; k++) y[47-k] = x[56-RPC2[k]];
    return y;
  endfunction

  // Classic DES key schedule (for known-answer tests of the round engine).
  function automatic keys16_t ref_std_subkeys(logic [63:0] key);
    keys16_t ks;
    logic [55:0] cd = ref_pc1(key);
    logic [27:0] c = cd[55:28], d = cd[27:0];
    for (int i = 0; i < 16; i++) begin
      int n = (i == 0 || i == 1 || i == 8 || i == 15) ? 1 : 2;
      for (int j = 0; j < n; j++) begin
        c = {c[26:0], c[27]};
        d = {d[26:0], d[27]};
      end
      ks[i] = ref_pc2({c, d});
    end
    return ks;
  endfunction

  // One shift of the XNOR feedback register, taps at stages ta and tb.
  function automatic logic [63:0] ref_prkg_step(logic [63:0] s, int unsigned ta = 1,
                                                int unsigned tb = 64);
    logic fb = !(s[64-ta] ^ s[64-tb]);
    return {fb, s[63:1]};
  endfunction

  // Pseudo random subkeys: KEYi = PC2(PC1(state after i*steps shifts)).
  function automatic keys16_t ref_prkg_subkeys(logic [63:0] key, int unsigned steps = 1);
    keys16_t ks;
    logic [63:0] s = key;
    for (int i = 0; i < 16; i++) begin
      for (int unsigned j = 0; j < steps; j++) s = ref_prkg_step(s);
      ks[i] = ref_pc2(ref_pc1(s));
    end
    return ks;
  endfunction

  function automatic logic [63:0] ref_des(logic [63:0] blk, keys16_t ks, logic dec);
    logic [63:0] t = ref_ip(blk);
    logic [31:0] l = t[63:32], r = t[31:0], n;
    for (int i = 0; i < 16; i++) begin
      n = l ^ ref_f(r, dec ? ks[15-i] : ks[i]);
      l = r;
      r = n;
    end
    return ref_ip_inv({r, l});
  endfunction

endpackage
