// des_prkg_tb: self-checking testbench for the XNOR feedback shift register.
//
// Hand-worked start from the all-zero reset state: the XNOR of two zeros is
// one, so the first shift gives 8000...; with taps 1 and 64 the next
// feedback is XNOR(1,0) = 0 (4000...), with taps 5 and 40 it is XNOR(0,0) = 1
// (C000...). Then seeded runs with random
// enable patterns against des_ref_pkg, load priority over step, hold when
// step is low, the all-ones stuck state, and a second instance with other
// taps.
module des_prkg_tb;
  import des_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst, load, step;
  logic [63:0] seed, state, state2, model, model2;
  int checks = 0, failures = 0;

  des_prkg dut (.clk(clk), .rst(rst), .load(load), .seed(seed), .step(step), .state(state));
  des_prkg #(.N(64), .TAP_A(5), .TAP_B(40)) dut2 (
    .clk(clk), .rst(rst), .load(load), .seed(seed), .step(step), .state(state2));

  task automatic expect_state(logic [63:0] exp, logic [63:0] exp2);
    checks++;
    if (state !== exp || state2 !== exp2) begin
      failures++;
      $display("FAIL state=%h expected=%h | state2=%h expected=%h", state, exp, state2, exp2);
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
    rst = 1; load = 0; step = 0; seed = '0;
    @(posedge clk); #1;
    rst = 0;
    expect_state(64'h0, 64'h0);
    step = 1;
    @(posedge clk); #1; expect_state(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    @(posedge clk); #1; expect_state(64'h4000_0000_0000_0000, 64'hC000_0000_0000_0000);
    // All ones never leaves all ones.
    load = 1; seed = '1;
    @(posedge clk); #1;
    load = 0;
    repeat (3) begin @(posedge clk); #1; expect_state('1, '1); end
    // Seeded random runs.
    for (int run = 0; run < 20; run++) begin
      seed = {$urandom, $urandom};
      load = 1; step = 1;         // load wins over step
      @(posedge clk); #1;
      load = 0;
      model = seed; model2 = seed;
      expect_state(model, model2);
      for (int i = 0; i < 100; i++) begin
        step = 1'($urandom);
        @(posedge clk); #1;
        if (step) begin
          model  = ref_prkg_step(model);
          model2 = ref_prkg_step(model2, 5, 40);
        end
        expect_state(model, model2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
