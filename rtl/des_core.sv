// des_core: iterative DES round engine for encryption and decryption.
//
// One set of hardware does both directions: the rounds are identical and
// only the order in which the subkeys are read changes (KEY1..KEY16 for
// encryption, KEY16..KEY1 for decryption).
//
// Datapath, as in the engine's block diagram: the initial permutation
// (des_ip) splits the input block into the left-half and right-half
// registers L and R. Each round expands R to 48 bits (des_expand), XORs it
// with the round subkey, substitutes through S1..S8 (des_sbox_bank),
// permutes the 32-bit result (des_pperm) and XORs it with L into the
// temporary register TEMP. TEMP is then transferred to R and the old R to L.
// After the last round the pre-output {R, L} (halves swapped back, as in
// standard DES, so that decryption inverts encryption) goes through the
// inverse initial permutation (des_ip_inv) into the output register.
//
// Timing: a round takes two clocks, one to load TEMP and one to transfer
// TEMP -> R, R -> L. start is accepted on a rising edge while idle (ignored
// while busy) and samples din and decrypt. done is a one-clock pulse,
// 2*NUM_ROUNDS edges after the start edge; dout then holds the result until
// the next block finishes. subkeys must stay stable while busy. The two-clock
// round, the handshake and the synchronous active-high reset are this
// implementation's choices.
module des_core
  import des_pkg::*;
#(
  parameter int unsigned NUM_ROUNDS = ROUNDS
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    start,
  input  logic    decrypt,
  input  block_t  din,
  input  subkey_t subkeys [NUM_ROUNDS],
  output logic    busy,
  output logic    done,
  output block_t  dout
);
  localparam int unsigned RD_W = (NUM_ROUNDS > 1) ? $clog2(NUM_ROUNDS) : 1;

  typedef enum logic [1:0] {S_IDLE, S_CALC, S_XFER} state_e;

  state_e         st;
  logic [RD_W-1:0] round;
  logic           mode_dec;
  half_t          l_reg, r_reg, temp_reg;

  block_t  ip_out, ip_inv_out;
  subkey_t e_out, round_key;
  half_t   s_out, p_out;

  des_ip      u_ip     (.din(din), .dout(ip_out));
  des_expand  u_expand (.din(r_reg), .dout(e_out));
  des_sbox_bank u_sbox (.din(e_out ^ round_key), .dout(s_out));
  des_pperm   u_pperm  (.din(s_out), .dout(p_out));
  des_ip_inv  u_ipinv  (.din({temp_reg, r_reg}), .dout(ip_inv_out));

  always_comb begin
    if (mode_dec) round_key = subkeys[RD_W'(NUM_ROUNDS - 1) - round];
    else          round_key = subkeys[round];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= S_IDLE;
      round    <= '0;
      mode_dec <= 1'b0;
      l_reg    <= '0;
      r_reg    <= '0;
      temp_reg <= '0;
      done     <= 1'b0;
      dout     <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          l_reg    <= ip_out[63:32];
          r_reg    <= ip_out[31:0];
          mode_dec <= decrypt;
          round    <= '0;
          st       <= S_CALC;
        end
        S_CALC: begin
          temp_reg <= l_reg ^ p_out;
          st       <= S_XFER;
        end
        S_XFER: begin
          l_reg <= r_reg;
          r_reg <= temp_reg;
          if (round == RD_W'(NUM_ROUNDS - 1)) begin
            dout <= ip_inv_out;
            done <= 1'b1;
            st   <= S_IDLE;
          end else begin
            round <= round + 1'b1;
            st    <= S_CALC;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  always_comb busy = (st != S_IDLE);

  // The round counter never leaves the subkey table.
  a_round_in_range: assert property (@(posedge clk) disable iff (rst)
    int'(round) < NUM_ROUNDS);
  // done is a single-cycle pulse.
  a_done_pulse: assert property (@(posedge clk) disable iff (rst)
    done |=> !done);
endmodule
