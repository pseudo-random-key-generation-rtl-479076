// des_compress_tb: self-checking testbench for the 64 -> 48-bit compression.
//
// The compression is PC-2 after PC-1. Known answers: a word whose PC-1 is
// the classic example's C1D1 = E19955FAACCF1E must compress to that
// example's K1 = 1B02EFFC7072; the parity bits (8, 16, ..., 64) must not
// matter. Then single-bit and random words against des_ref_pkg.
module des_compress_tb;
  import des_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [63:0] din;
  logic [47:0] dout;
  int checks = 0, failures = 0;

  des_compress dut (.din(din), .dout(dout));

  task automatic check(logic [63:0] x, logic [47:0] exp);
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
    logic [63:0] pre;
    pre = ref_pc1_preimage(56'hE19955FAACCF1E);
    check(pre, 48'h1B02EFFC7072);
    check(pre | 64'h0101010101010101, 48'h1B02EFFC7072);
    for (int i = 0; i < 64; i++) check(64'(1) << i, ref_pc2(ref_pc1(64'(1) << i)));
    for (int i = 0; i < 300; i++) begin
      automatic logic [63:0] x = {$urandom, $urandom};
      check(x, ref_pc2(ref_pc1(x)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
