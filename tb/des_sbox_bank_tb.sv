// des_sbox_bank_tb: self-checking testbench for the eight S-boxes.
//
// Checks the published first-round value of the classic DES worked example,
// then every one of the 64 inputs of every box (with random data in the
// other seven groups, so each box is also seen to ignore them) against the
// S-box tables of des_ref_pkg, then random words.
module des_sbox_bank_tb;
  import des_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [47:0] din;
  logic [31:0] dout;
  int checks = 0, failures = 0;

  des_sbox_bank dut (.din(din), .dout(dout));

  task automatic check(logic [47:0] x, logic [31:0] exp);
    din = x;
    @(posedge clk);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL in=%h out=%h expected=%h", x, dout, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(48'h6117BA866527, 32'h5C82B597);
    for (int b = 0; b < 8; b++)
      for (int v = 0; v < 64; v++) begin
        automatic logic [47:0] x = 48'({$urandom, $urandom});
        x[47-6*b -: 6] = 6'(v);
        check(x, ref_sbank(x));
      end
    for (int i = 0; i < 200; i++) begin
      automatic logic [47:0] x = 48'({$urandom, $urandom});
      check(x, ref_sbank(x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
