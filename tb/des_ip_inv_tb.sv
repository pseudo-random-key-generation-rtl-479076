// des_ip_inv_tb: self-checking testbench for des_ip_inv.
//
// Checks a published known-answer value, every single-bit input (which pins
// down the whole bit selection), and random words against the reference
// model in des_ref_pkg. Combinational DUT; a free-running clock paces the
// stimulus and drives the watchdog.
module des_ip_inv_tb;
  import des_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [64-1:0] din;
  logic [64-1:0] dout;
  int checks = 0, failures = 0;

  des_ip_inv dut (.din(din), .dout(dout));

  task automatic check(logic [64-1:0] x, logic [64-1:0] exp);
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
    check(64'h0A4CD99543423234, 64'h85E813540F0AB405);
    for (int i = 0; i < 64; i++) check(64'(1) << i, ref_ip_inv((64'(1) << i)));
    for (int i = 0; i < 300; i++) begin
      automatic logic [64-1:0] x = 64'({$urandom, $urandom});
      check(x, ref_ip_inv(x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
