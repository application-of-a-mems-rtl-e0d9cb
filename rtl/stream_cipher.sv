// One end of the STM-LFSR stream cipher: transmitter or receiver.
//
// Each 8-bit input block is XORed with the next keystream byte of the chaotic generator
// and registered in the output stage (the OUT register of the cipher diagram). Encryption
// and decryption are the same operation, so the receiver is a second instance loaded with
// the same key, fed with the ciphertext.
//
// Interface: key_load_i with key_i starts a session (the generator then spends 131 cycles
// precalculating its reciprocals, ready_o low). While ready_o is high, every cycle with
// in_valid_i consumes one keystream byte; the result appears on out_data_o with out_valid_o
// one clock later. Bytes presented while ready_o is low are dropped; the sender must wait
// for ready_o (checked by an assertion). Throughput is one byte per clock.
module stream_cipher
  import stm_cipher_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              key_load_i,
  input  seed_t             key_i,
  output logic              ready_o,
  input  logic              in_valid_i,
  input  logic [BYTE_W-1:0] in_data_i,
  output logic              out_valid_o,
  output logic [BYTE_W-1:0] out_data_o,
  output logic              left_branch_o,
  output logic              lsb_flip_o
);

  logic              ready;
  logic [BYTE_W-1:0] ks;
  logic              take;

  assign take = in_valid_i && ready;

  chaotic_generator u_gen (
    .clk, .rst_n,
    .seed_load_i  (key_load_i),
    .seed_i       (key_i),
    .ready_o      (ready),
    .step_i       (take),
    .ks_o         (ks),
    .left_branch_o(left_branch_o),
    .lsb_flip_o   (lsb_flip_o)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid_o <= 1'b0;
      out_data_o  <= '0;
    end else begin
      out_valid_o <= take;
      if (take) out_data_o <= in_data_i ^ ks;
    end
  end

  assign ready_o = ready;

  a_no_data_before_ready: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid_i |-> ready) else $error("stream_cipher: input byte offered before the key is ready");

endmodule
