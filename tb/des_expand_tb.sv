// des_expand_tb: self-checking testbench for des_expand.
//
// Checks a published known-answer value, every single-bit input (which pins
// down the whole bit selection), and random words against the reference
// model in des_ref_pkg. Combinational DUT; a free-running clock paces the
// stimulus and drives the watchdog.
module des_expand_tb;
  import des_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [32-1:0] din;
  logic [48-1:0] dout;
  int checks = 0, failures = 0;

  des_expand dut (.din(din), .dout(dout));

  task automatic check(logic [32-1:0] x, logic [48-1:0] exp);
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
    check(32'hF0AAF0AA, 48'h7A15557A1555);
    for (int i = 0; i < 32; i++) check(32'(1) << i, ref_e((32'(1) << i)));
    for (int i = 0; i < 300; i++) begin
      automatic logic [32-1:0] x = 32'({$urandom, $urandom});
      check(x, ref_e(x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
