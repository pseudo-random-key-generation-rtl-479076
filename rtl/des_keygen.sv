// des_keygen: subkey generation circuit. Turns the user key into the
// ROUNDS round subkeys KEY1..KEY16 with the pseudo random key generator.
//
// The 64-bit user key seeds des_prkg (left 32 bits into REG1..REG32, right
// 32 bits into REG33..REG64). The generator then shifts once per clock; after
// every STEPS_PER_KEY shifts its 64-bit state is passed through the
// compression permutation (des_compress) and the 48-bit result is stored as
// the next subkey. KEYi is therefore compress(state after i*STEPS_PER_KEY
// shifts). All subkeys are kept in a register file so that the round engine
// can read them forwards for encryption and backwards for decryption.
//
// Timing: load is sampled on a rising edge (it restarts the generator even
// while busy). KEYi is written i*STEPS_PER_KEY+1 edges later; ready rises
// with the write of the last subkey, ROUNDS*STEPS_PER_KEY+1 edges after load,
// and stays high until the next load or reset. busy is high in between.
// Storing the subkeys and the step count per subkey are this
// implementation's choices; the generator, the compression step and the 16
// subkeys follow the design. Synchronous active-high reset.
module des_keygen
  import des_pkg::*;
#(
  parameter int unsigned NUM_ROUNDS    = ROUNDS,
  parameter int unsigned STEPS_PER_KEY = 1
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    load,
  input  key_t    key,
  output logic    busy,
  output logic    ready,
  output subkey_t subkeys [NUM_ROUNDS]
);
  localparam int unsigned KI_W = (NUM_ROUNDS > 1) ? $clog2(NUM_ROUNDS) : 1;
  localparam int unsigned PH_W = (STEPS_PER_KEY > 1) ? $clog2(STEPS_PER_KEY) : 1;

  logic            running;
  logic [PH_W-1:0] ph;        // shifts done towards the current subkey
  logic [KI_W-1:0] ki;        // subkey the shifts are heading for
  logic            cap;       // generator state is due to be stored
  logic [KI_W-1:0] cap_idx;
  key_t            state;
  subkey_t         compressed;

  des_prkg #(.N(KEY_W), .TAP_A(1), .TAP_B(KEY_W)) u_prkg (
    .clk   (clk),
    .rst   (rst),
    .load  (load),
    .seed  (key),
    .step  (running),
    .state (state)
  );

  des_compress u_compress (
    .din  (state),
    .dout (compressed)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      running <= 1'b0;
      ready   <= 1'b0;
      ph      <= '0;
      ki      <= '0;
      cap     <= 1'b0;
      cap_idx <= '0;
      for (int i = 0; i < NUM_ROUNDS; i++) subkeys[i] <= '0;
    end else if (load) begin
      running <= 1'b1;
      ready   <= 1'b0;
      ph      <= '0;
      ki      <= '0;
      cap     <= 1'b0;
    end else begin
      cap <= 1'b0;
      if (running) begin
        if (ph == PH_W'(STEPS_PER_KEY - 1)) begin
          ph      <= '0;
          cap     <= 1'b1;
          cap_idx <= ki;
          if (ki == KI_W'(NUM_ROUNDS - 1)) running <= 1'b0;
          else                             ki      <= ki + 1'b1;
        end else begin
          ph <= ph + 1'b1;
        end
      end
      if (cap) begin
        subkeys[cap_idx] <= compressed;
        if (cap_idx == KI_W'(NUM_ROUNDS - 1)) ready <= 1'b1;
      end
    end
  end

  always_comb busy = running | cap;
endmodule
