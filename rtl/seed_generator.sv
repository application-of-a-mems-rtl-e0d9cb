// Seed generator: accelerometer noise to a 189-bit cipher key.
//
// The digital part of the true random number generator. Samples of the X and Y axes of an
// accelerometer at rest arrive from an external 8-bit A/D converter. The Y sample is
// subtracted from the X sample to cancel noise common to both axes, the DC level is
// removed (dc_filter), the sign of each sample gives one raw bit (sign_detector), and the
// raw bitstream is whitened by SHA-512 into the key (seed_conditioner). Every stage
// follows the document's processing chain; the filter and the key layout are this
// design's choices, described in those blocks.
//
// Interface: one sample pair per sample_valid_i (the sample rate is set by the caller; the
// document measured 0.1 to 250 kSps). The filter runs on every sample so that its mean is
// settled; raw bits are used only while a key is being gathered. key_req_i starts a new
// key; key_valid_o pulses with key_o. Latency from a sample to its raw bit is 3 clocks.
module seed_generator
  import stm_cipher_pkg::*;
#(
  parameter int unsigned SAMPLE_W   = 8,
  parameter int unsigned FRAC       = 16,
  parameter int unsigned SHIFT      = 8,
  parameter int unsigned MSG_BLOCKS = 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       sample_valid_i,
  input  logic signed [SAMPLE_W-1:0] x_sample_i,
  input  logic signed [SAMPLE_W-1:0] y_sample_i,
  input  logic                       key_req_i,
  output logic                       busy_o,
  output logic                       key_valid_o,
  output seed_t                      key_o,
  output logic                       raw_valid_o,    // a raw bit was taken into the hash
  output logic                       raw_bit_o,
  output logic                       block_hashed_o
);

  localparam int unsigned D_W   = SAMPLE_W + 1;
  localparam int unsigned OUT_W = D_W + FRAC + 1;

  logic                    diff_valid_q;
  logic signed [D_W-1:0]   diff_q;
  logic                    filt_valid;
  logic signed [OUT_W-1:0] filt;
  logic                    bit_valid, raw_bit, raw_ready;

  // X - Y, registered; one extra bit so the difference never overflows.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      diff_valid_q <= 1'b0;
      diff_q       <= '0;
    end else begin
      diff_valid_q <= sample_valid_i;
      if (sample_valid_i) diff_q <= D_W'(x_sample_i) - D_W'(y_sample_i);
    end
  end

  dc_filter #(.IN_W(D_W), .FRAC(FRAC), .SHIFT(SHIFT)) u_dc (
    .clk, .rst_n,
    .in_valid_i (diff_valid_q),
    .in_i       (diff_q),
    .out_valid_o(filt_valid),
    .out_o      (filt)
  );

  sign_detector #(.W(OUT_W)) u_sign (
    .clk, .rst_n,
    .in_valid_i (filt_valid),
    .in_i       (filt),
    .bit_valid_o(bit_valid),
    .bit_o      (raw_bit)
  );

  seed_conditioner #(.MSG_BLOCKS(MSG_BLOCKS)) u_cond (
    .clk, .rst_n,
    .key_req_i     (key_req_i),
    .raw_valid_i   (bit_valid),
    .raw_i         (raw_bit),
    .raw_ready_o   (raw_ready),
    .busy_o        (busy_o),
    .key_valid_o   (key_valid_o),
    .key_o         (key_o),
    .block_hashed_o(block_hashed_o)
  );

  assign raw_valid_o = bit_valid && raw_ready;
  assign raw_bit_o   = raw_bit;

endmodule
