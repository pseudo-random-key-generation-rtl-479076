// des_core_tb: self-checking testbench for the round engine.
//
// The engine is fed subkeys from the classic DES key schedule (computed by
// des_ref_pkg), so the published DES known-answer vectors apply:
//   key 133457799BBCDFF1, plain 0123456789ABCDEF -> cipher 85E813540F0AB405
//   key 0E329232EA6D0D73, plain 8787878787878787 -> cipher 0000000000000000
// Each is also decrypted back. Then random keys and blocks against the
// reference, in both directions, with the latency checked (done 32 edges
// after the start edge) and a start pulse during a run that must be ignored.
module des_core_tb;
  import des_pkg::*;
  import des_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic    rst, start, decrypt, busy, done;
  block_t  din, dout;
  subkey_t sk [16];
  int checks = 0, failures = 0;

  des_core dut (.clk(clk), .rst(rst), .start(start), .decrypt(decrypt), .din(din),
                .subkeys(sk), .busy(busy), .done(done), .dout(dout));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic set_keys(keys16_t ks);
    for (int i = 0; i < 16; i++) sk[i] = ks[i];
  endtask

  // Runs one block; optionally pulses start again in the middle.
  task automatic run(logic [63:0] blk, logic dec, logic [63:0] exp, bit poke);
    int lat = 0;
    din = blk; decrypt = dec; start = 1;
    @(posedge clk); #1;
    start = 0;
    check(busy, "busy after start");
    while (!done && lat < 100) begin
      if (poke && lat == 9) begin din = ~blk; decrypt = ~dec; start = 1; end
      else start = 0;
      @(posedge clk); #1;
      lat++;
    end
    start = 0;
    check(lat == 32, $sformatf("latency %0d, expected 32", lat));
    check(dout === exp, $sformatf("%s %h -> %h, expected %h", dec ? "dec" : "enc", blk, dout, exp));
    @(posedge clk); #1;
    check(!done && !busy, "done is a single pulse and engine returns to idle");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; start = 0; decrypt = 0; din = '0;
    set_keys(ref_std_subkeys(64'h133457799BBCDFF1));
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(!busy && !done, "idle after reset");
    run(64'h0123456789ABCDEF, 1'b0, 64'h85E813540F0AB405, 1'b0);
    run(64'h85E813540F0AB405, 1'b1, 64'h0123456789ABCDEF, 1'b1);
    set_keys(ref_std_subkeys(64'h0E329232EA6D0D73));
    run(64'h8787878787878787, 1'b0, 64'h0000000000000000, 1'b1);
    run(64'h0000000000000000, 1'b1, 64'h8787878787878787, 1'b0);
    for (int i = 0; i < 40; i++) begin
      automatic logic [63:0] k = {$urandom, $urandom};
      automatic logic [63:0] p = {$urandom, $urandom};
      automatic keys16_t ks = (i % 2 == 0) ? ref_std_subkeys(k) : ref_prkg_subkeys(k);
      automatic logic [63:0] c = ref_des(p, ks, 1'b0);
      set_keys(ks);
      run(p, 1'b0, c, i % 3 == 0);
      run(c, 1'b1, p, i % 3 == 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
