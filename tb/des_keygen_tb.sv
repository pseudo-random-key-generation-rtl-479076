// des_keygen_tb: self-checking testbench for the subkey generation circuit.
//
// Two instances: the default one (one shift per subkey) and one with three
// shifts per subkey. For random keys it checks KEY1..KEY16 against the
// reference generator of des_ref_pkg, the ready latency
// (16*STEPS_PER_KEY+1 edges after load), busy while generating, and that a
// second load in the middle of a run restarts generation from the new key.
module des_keygen_tb;
  import des_pkg::*;
  import des_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic    rst, load;
  key_t    key;
  logic    busy1, ready1, busy3, ready3;
  subkey_t sk1 [16];
  subkey_t sk3 [16];
  int checks = 0, failures = 0;

  des_keygen dut1 (.clk(clk), .rst(rst), .load(load), .key(key),
                   .busy(busy1), .ready(ready1), .subkeys(sk1));
  des_keygen #(.NUM_ROUNDS(16), .STEPS_PER_KEY(3)) dut3 (
    .clk(clk), .rst(rst), .load(load), .key(key), .busy(busy3), .ready(ready3), .subkeys(sk3));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic check_keys(logic [63:0] k);
    automatic keys16_t e1 = ref_prkg_subkeys(k, 1);
    automatic keys16_t e3 = ref_prkg_subkeys(k, 3);
    for (int i = 0; i < 16; i++) begin
      check(sk1[i] === e1[i], $sformatf("KEY%0d (1 shift) = %h, expected %h", i + 1, sk1[i], e1[i]));
      check(sk3[i] === e3[i], $sformatf("KEY%0d (3 shifts) = %h, expected %h", i + 1, sk3[i], e3[i]));
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t1, t3;
    rst = 1; load = 0; key = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(!ready1 && !busy1 && !ready3 && !busy3, "idle after reset");
    for (int run = 0; run < 20; run++) begin
      key = {$urandom, $urandom};
      if (run == 5) key = 64'h133457799BBCDFF1;
      load = 1;
      @(posedge clk); #1;
      load = 0;
      if (run % 4 == 3) begin
        // Restart half way with another key.
        repeat (8) @(posedge clk);
        #1;
        check(busy1 && busy3 && !ready1 && !ready3, "busy before restart");
        key = {$urandom, $urandom};
        load = 1;
        @(posedge clk); #1;
        load = 0;
      end
      t1 = 0; t3 = 0;
      check(busy1 && !ready1 && busy3 && !ready3, "busy after load");
      for (int c = 1; c <= 60; c++) begin
        @(posedge clk); #1;
        if (ready1 && t1 == 0) t1 = c;
        if (ready3 && t3 == 0) t3 = c;
      end
      check(t1 == 17, $sformatf("ready latency %0d, expected 17", t1));
      check(t3 == 49, $sformatf("ready latency (3 shifts) %0d, expected 49", t3));
      check(!busy1 && !busy3, "idle when ready");
      check_keys(key);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
