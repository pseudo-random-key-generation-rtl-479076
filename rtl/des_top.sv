// des_top: DES encryption/decryption engine with pseudo random subkey
// generation.
//
// The user key is not expanded with the classic DES rotate schedule.
// Instead it seeds a 64-stage XNOR feedback shift register (des_keygen,
// des_prkg) whose successive states are compressed to the 16 round subkeys
// KEY1..KEY16. The subkeys are kept, and one iterative round engine
// (des_core) uses them forwards to encrypt and backwards to decrypt, so a
// block encrypted under a key is recovered by decrypting under the same key.
//
// Interface (all synchronous to clk, active-high synchronous reset rst):
//   cs_n      active-low chip select; while high, key_load and start are
//             ignored.
//   key_load  with key: generate the subkeys for a new key. Ignored while a
//             block is in progress. key_ready falls and rises again
//             16*STEPS_PER_KEY+1 clocks later.
//   start     with text_in and decrypt (0 encrypt, 1 decrypt): process one
//             64-bit block. Accepted only when key_ready is high and no block
//             or key generation is in progress.
//   done      one-clock pulse, 32 clocks after the accepted start; text_out
//             then holds the result.
//   busy      key generation or a block is in progress.
//   subkeys   KEY1..KEY16 as stored, for observation.
// The chip select, the handshake and the gating rules are this
// implementation's choices.
module des_top
  import des_pkg::*;
#(
  parameter int unsigned NUM_ROUNDS    = ROUNDS,
  parameter int unsigned STEPS_PER_KEY = 1
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    cs_n,
  input  logic    key_load,
  input  key_t    key,
  input  logic    start,
  input  logic    decrypt,
  input  block_t  text_in,
  output block_t  text_out,
  output logic    done,
  output logic    busy,
  output logic    key_ready,
  output subkey_t subkeys [NUM_ROUNDS]
);
  logic kg_busy, core_busy;
  logic kg_load, core_start;

  always_comb begin
    kg_load    = !cs_n && key_load && !core_busy;
    core_start = !cs_n && start && key_ready && !kg_busy && !core_busy;
    busy       = kg_busy || core_busy;
  end

  des_keygen #(.NUM_ROUNDS(NUM_ROUNDS), .STEPS_PER_KEY(STEPS_PER_KEY)) u_keygen (
    .clk     (clk),
    .rst     (rst),
    .load    (kg_load),
    .key     (key),
    .busy    (kg_busy),
    .ready   (key_ready),
    .subkeys (subkeys)
  );

  des_core #(.NUM_ROUNDS(NUM_ROUNDS)) u_core (
    .clk     (clk),
    .rst     (rst),
    .start   (core_start),
    .decrypt (decrypt),
    .din     (text_in),
    .subkeys (subkeys),
    .busy    (core_busy),
    .done    (done),
    .dout    (text_out)
  );

  // The subkeys never change under a block in progress.
  a_no_key_change_while_busy: assert property (@(posedge clk) disable iff (rst)
    core_busy |-> !kg_load);
endmodule
