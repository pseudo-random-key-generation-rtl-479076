// des_top_tb: end-to-end testbench of the whole engine at its default
// parameters (16 rounds, one generator shift per subkey).
//
// For random keys and plaintext blocks it loads the key, checks KEY1..KEY16
// against the reference pseudo random key generator, encrypts a block and
// compares with the reference DES model using those subkeys, then decrypts
// the cipher text and expects the original plaintext back. Along the way it
// exercises, and counts, every control mechanism of the top:
//   key generation, encryption, decryption, a command ignored because chip
//   select is inactive, a start ignored while the subkeys are being
//   generated, a key load ignored while a block is in progress and a start
//   ignored while a block is in progress.
// A mechanism that never happened counts as a failure.
module des_top_tb;
  import des_pkg::*;
  import des_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic    rst, cs_n, key_load, start, decrypt;
  key_t    key;
  block_t  text_in, text_out;
  logic    done, busy, key_ready;
  subkey_t subkeys [16];
  int checks = 0, failures = 0;
  int n_keygen = 0, n_enc = 0, n_dec = 0, n_cs_block = 0;
  int n_start_in_keygen = 0, n_load_in_block = 0, n_start_in_block = 0;

  des_top dut (
    .clk(clk), .rst(rst), .cs_n(cs_n), .key_load(key_load), .key(key),
    .start(start), .decrypt(decrypt), .text_in(text_in), .text_out(text_out),
    .done(done), .busy(busy), .key_ready(key_ready), .subkeys(subkeys));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic bit keys_match(keys16_t e);
    for (int i = 0; i < 16; i++) if (subkeys[i] !== e[i]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic idle_inputs();
    key_load = 0; start = 0;
  endtask

  // Load a key, poking start while the generator runs; start must not act.
  task automatic load_key(logic [63:0] k);
    int lat = 0;
    bit seen_done = 0;
    cs_n = 0; key = k; key_load = 1;
    @(posedge clk); #1;
    idle_inputs();
    n_keygen++;
    while (!key_ready && lat < 100) begin
      start = (lat == 4);
      text_in = {$urandom, $urandom};
      @(posedge clk); #1;
      seen_done |= done;
      lat++;
    end
    start = 0;
    check(lat == 17, $sformatf("key generation took %0d clocks, expected 17", lat));
    repeat (40) begin @(posedge clk); #1; seen_done |= done; end
    check(!seen_done && !busy, "start during key generation was ignored");
    if (!seen_done) n_start_in_keygen++;
    check(keys_match(ref_prkg_subkeys(k)), $sformatf("subkeys for key %h", k));
  endtask

  // Process one block; optionally try a key load and a start in the middle.
  task automatic run_block(logic [63:0] blk, logic dec, logic [63:0] exp, bit poke);
    int lat = 0;
    automatic logic [63:0] other = {$urandom, $urandom};
    cs_n = 0; text_in = blk; decrypt = dec; start = 1;
    @(posedge clk); #1;
    idle_inputs();
    while (!done && lat < 100) begin
      if (poke && lat == 6) begin key = other; key_load = 1; end
      else if (poke && lat == 11) begin text_in = ~blk; decrypt = ~dec; start = 1; end
      else idle_inputs();
      @(posedge clk); #1;
      lat++;
    end
    idle_inputs();
    check(lat == 32, $sformatf("block latency %0d, expected 32", lat));
    check(text_out === exp, $sformatf("%s %h -> %h, expected %h", dec ? "decrypt" : "encrypt",
                                      blk, text_out, exp));
    if (dec) n_dec++; else n_enc++;
    if (poke) begin
      check(key_ready && !busy, "key load during a block was ignored");
      if (key_ready && !busy) n_load_in_block++;
      n_start_in_block++;   // the result check above proves the extra start did nothing
    end
  endtask

  // With chip select inactive neither a key load nor a start acts.
  task automatic cs_blocked(logic [63:0] k_now);
    bit seen = 0;
    cs_n = 1; key = ~k_now; key_load = 1; start = 1; text_in = {$urandom, $urandom};
    @(posedge clk); #1;
    idle_inputs();
    repeat (40) begin @(posedge clk); #1; seen |= done | busy | !key_ready; end
    cs_n = 0;
    check(!seen && keys_match(ref_prkg_subkeys(k_now)), "commands ignored while cs_n is high");
    if (!seen) n_cs_block++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; cs_n = 1; key_load = 0; start = 0; decrypt = 0; key = '0; text_in = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    check(!busy && !key_ready && !done, "idle after reset");
    // Without a key, start is refused.
    cs_n = 0; start = 1;
    @(posedge clk); #1;
    start = 0;
    repeat (40) begin @(posedge clk); #1; check(!done && !busy, "no block without a key"); end

    for (int i = 0; i < 24; i++) begin
      automatic logic [63:0] k = {$urandom, $urandom};
      keys16_t ks;
      if (i == 0) k = 64'h133457799BBCDFF1;
      ks = ref_prkg_subkeys(k);
      load_key(k);
      for (int j = 0; j < 3; j++) begin
        automatic logic [63:0] p = {$urandom, $urandom};
        automatic logic [63:0] c = ref_des(p, ks, 1'b0);
        run_block(p, 1'b0, c, j == 1);
        run_block(c, 1'b1, p, j == 2);
        check(keys_match(ks), "subkeys unchanged by the ignored key loads");
      end
      if (i % 4 == 0) cs_blocked(k);
    end

    $display("mechanisms: keygen=%0d encrypt=%0d decrypt=%0d cs_blocked=%0d",
             n_keygen, n_enc, n_dec, n_cs_block);
    $display("            start_in_keygen=%0d load_in_block=%0d start_in_block=%0d",
             n_start_in_keygen, n_load_in_block, n_start_in_block);
    check(n_keygen > 0, "key generation happened");
    check(n_enc > 0, "encryption happened");
    check(n_dec > 0, "decryption happened");
    check(n_cs_block > 0, "chip-select blocking happened");
    check(n_start_in_keygen > 0, "start during key generation happened");
    check(n_load_in_block > 0, "key load during a block happened");
    check(n_start_in_block > 0, "start during a block happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
