// des_prkg: pseudo random key generator, an N-stage XNOR feedback shift
// register (stages REG1..REGN).
//
// As drawn for this engine, the register stages form one chain clocked
// together; the outputs of two tap stages go through an XOR gate and an
// inverter (XOR1, NOT1) into REG1, while every other stage takes the output
// of the stage to its left. The default taps are REG1 (the first stage, in
// the left 32-bit half) and REGN (the last stage, in the right 32-bit half),
// so the feedback combines one bit of each half of the 64-bit key word.
//
//   REG1 <= ~(REG[TAP_A] ^ REG[TAP_B]);  REGk <= REG(k-1) for k = 2..N
//
// Stage k is state[N-k], so REG1 is the most significant bit and the word
// shifts towards the least significant bit. The taps and the one-bit shift
// per clock are this implementation's reading of the drawing; the width N is
// the 64-bit key. An XNOR register has one stuck state, all ones.
//
// Interface: load (priority) copies seed into the register; step advances it
// by one shift. Both take effect on the rising clock edge; state is the
// register itself. Synchronous active-high reset clears it.
module des_prkg #(
  parameter int unsigned N     = 64,
  parameter int unsigned TAP_A = 1,
  parameter int unsigned TAP_B = 64
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [N-1:0] seed,
  input  logic         step,
  output logic [N-1:0] state
);
  initial begin
    assert (TAP_A >= 1 && TAP_A <= N && TAP_B >= 1 && TAP_B <= N && TAP_A != TAP_B)
      else $error("des_prkg: taps must be two different stages 1..N");
  end

  logic feedback;
  always_comb feedback = ~(state[N-TAP_A] ^ state[N-TAP_B]);

  always_ff @(posedge clk) begin
    if (rst)       state <= '0;
    else if (load) state <= seed;
    else if (step) state <= {feedback, state[N-1:1]};
  end
endmodule
