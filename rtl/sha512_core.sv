// SHA-512 compression function (FIPS 180-4), one round per clock.
//
// This is the whitening stage of the seed generator: raw sensor bits are hashed and the
// digest becomes the cipher key. The core processes one 1024-bit message block per call.
// It keeps the eight working variables a..h, the 512-bit chaining value H and a sliding
// window of the last 16 message-schedule words, from which W(t) for t >= 16 is formed on
// the fly: W(t) = ssig1(W(t-2)) + W(t-7) + ssig0(W(t-15)) + W(t-16).
//
// Interface: pulse start_i with block_i (word 0 in bits 1023:960, big-endian as in the
// standard); first_i selects the initial hash value H0 instead of the previous digest.
// The core is busy for 80 round cycles plus one cycle that adds the working variables
// into H; then done_o pulses and digest_o (H0 word in bits 511:448) holds the chaining
// value. ready_o is high when a new block may be started. Message padding is left to the
// user of the core.
module sha512_core
  import sha512_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_i,
  input  logic          first_i,
  input  logic [1023:0] block_i,
  output logic          ready_o,
  output logic          done_o,
  output logic [511:0]  digest_o
);

  typedef enum logic [1:0] {S_IDLE, S_ROUND, S_FINAL} state_e;

  state_e      state_q;
  logic [6:0]  t_q;
  word_t       h_q [8];      // chaining value
  word_t       v_q [8];      // working variables a..h
  word_t       w_q [16];     // w_q[0] = W(t), w_q[15] = W(t+15)
  logic        done_q;

  word_t t1, t2, w_new;

  always_comb begin
    t1    = v_q[7] + bsig1(v_q[4]) + ch(v_q[4], v_q[5], v_q[6]) + K[t_q] + w_q[0];
    t2    = bsig0(v_q[0]) + maj(v_q[0], v_q[1], v_q[2]);
    // W(t+16) from W(t+14), W(t+9), W(t+1), W(t)
    w_new = ssig1(w_q[14]) + w_q[9] + ssig0(w_q[1]) + w_q[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      t_q     <= '0;
      done_q  <= 1'b0;
      for (int i = 0; i < 8; i++) begin
        h_q[i] <= H0[i];
        v_q[i] <= '0;
      end
      for (int i = 0; i < 16; i++) w_q[i] <= '0;
    end else begin
      done_q <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start_i) begin
          for (int i = 0; i < 8; i++) begin
            if (first_i) begin
              h_q[i] <= H0[i];
              v_q[i] <= H0[i];
            end else begin
              v_q[i] <= h_q[i];
            end
          end
          for (int i = 0; i < 16; i++) w_q[i] <= block_i[1023 - 64*i -: 64];
          t_q     <= '0;
          state_q <= S_ROUND;
        end
        S_ROUND: begin
          v_q[0] <= t1 + t2;
          v_q[1] <= v_q[0];
          v_q[2] <= v_q[1];
          v_q[3] <= v_q[2];
          v_q[4] <= v_q[3] + t1;
          v_q[5] <= v_q[4];
          v_q[6] <= v_q[5];
          v_q[7] <= v_q[6];
          for (int i = 0; i < 15; i++) w_q[i] <= w_q[i+1];
          w_q[15] <= w_new;
          t_q <= t_q + 1'b1;
          if (t_q == 7'(ROUNDS - 1)) state_q <= S_FINAL;
        end
        S_FINAL: begin
          for (int i = 0; i < 8; i++) h_q[i] <= h_q[i] + v_q[i];
          done_q  <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int i = 0; i < 8; i++) digest_o[511 - 64*i -: 64] = h_q[i];
  end

  assign ready_o = (state_q == S_IDLE);
  assign done_o  = done_q;

endmodule
