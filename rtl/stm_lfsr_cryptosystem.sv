// Complete cryptosystem: accelerometer-seeded STM-LFSR stream cipher.
//
// A seed generator turns accelerometer noise into a 189-bit key (gamma, x0, y0). The key
// is loaded into a transmitter and a receiver, two identical stream_cipher instances,
// exactly as the document's test set-up gives both ends the same initial parameters. In
// a real link the key would reach the receiver over a separate secure channel; it is
// brought out on key_o for that purpose. The transmitter encrypts plaintext bytes into
// ciphertext; the receiver turns ciphertext back into plaintext. The channel between them
// is outside this block: connect tx_data_o to rx_data_i (with the valid) to close it.
//
// Timing: after key_req_i the seed generator needs MSG_BLOCKS x 1024 raw bits (one per
// accepted sample pair) plus two SHA-512 blocks of 81 cycles each; key_valid_o then pulses
// and both cipher ends load the key. Each end is ready 131 cycles later (tx_ready_o,
// rx_ready_o) and then encrypts or decrypts one byte per clock with one clock of latency.
// A new key request re-keys both ends when its key arrives; bytes must not be offered
// while the corresponding ready is low.
module stm_lfsr_cryptosystem
  import stm_cipher_pkg::*;
#(
  parameter int unsigned SAMPLE_W   = 8,
  parameter int unsigned MSG_BLOCKS = 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // accelerometer samples from the external A/D converter
  input  logic                       sample_valid_i,
  input  logic signed [SAMPLE_W-1:0] x_sample_i,
  input  logic signed [SAMPLE_W-1:0] y_sample_i,
  // key generation
  input  logic                       key_req_i,
  output logic                       key_busy_o,
  output logic                       key_valid_o,
  output seed_t                      key_o,
  // transmitter
  output logic                       tx_ready_o,
  input  logic                       tx_valid_i,
  input  logic [BYTE_W-1:0]          tx_data_i,   // plaintext
  output logic                       tx_valid_o,
  output logic [BYTE_W-1:0]          tx_data_o,   // ciphertext
  // receiver
  output logic                       rx_ready_o,
  input  logic                       rx_valid_i,
  input  logic [BYTE_W-1:0]          rx_data_i,   // ciphertext
  output logic                       rx_valid_o,
  output logic [BYTE_W-1:0]          rx_data_o,   // recovered plaintext
  // activity, for monitoring
  output logic                       raw_valid_o,
  output logic                       block_hashed_o,
  output logic                       tx_left_branch_o,
  output logic                       tx_lsb_flip_o
);

  logic  key_valid;
  seed_t key;

  seed_generator #(.SAMPLE_W(SAMPLE_W), .MSG_BLOCKS(MSG_BLOCKS)) u_seed (
    .clk, .rst_n,
    .sample_valid_i,
    .x_sample_i,
    .y_sample_i,
    .key_req_i,
    .busy_o        (key_busy_o),
    .key_valid_o   (key_valid),
    .key_o         (key),
    .raw_valid_o   (raw_valid_o),
    .raw_bit_o     (),
    .block_hashed_o(block_hashed_o)
  );

  stream_cipher u_tx (
    .clk, .rst_n,
    .key_load_i   (key_valid),
    .key_i        (key),
    .ready_o      (tx_ready_o),
    .in_valid_i   (tx_valid_i),
    .in_data_i    (tx_data_i),
    .out_valid_o  (tx_valid_o),
    .out_data_o   (tx_data_o),
    .left_branch_o(tx_left_branch_o),
    .lsb_flip_o   (tx_lsb_flip_o)
  );

  stream_cipher u_rx (
    .clk, .rst_n,
    .key_load_i   (key_valid),
    .key_i        (key),
    .ready_o      (rx_ready_o),
    .in_valid_i   (rx_valid_i),
    .in_data_i    (rx_data_i),
    .out_valid_o  (rx_valid_o),
    .out_data_o   (rx_data_o),
    .left_branch_o(),
    .lsb_flip_o   ()
  );

  assign key_valid_o = key_valid;
  assign key_o       = key;

endmodule
