// DC-level removal for the accelerometer noise samples.
//
// The document removes the DC level of the sampled noise before sign detection but does
// not say how. This block does it with a first-order high-pass filter, the simplest
// circuit that tracks a slowly moving offset: an accumulator holds a running mean m with
// FRAC fractional bits, and for each input sample s
//     d = s - m          (output, exact, with FRAC fractional bits)
//     m <- m + d / 2^SHIFT   (arithmetic shift, i.e. an exponential moving average)
// The mean follows the input with a time constant of about 2^SHIFT samples. Keeping the
// fraction of d makes an exact zero output rare, so the sign detector that follows is
// not biased by integer ties. The mean starts at 0 after reset.
//
// Interface: one sample per in_valid_i cycle; out_valid_o and out_o follow one clock later.
module dc_filter #(
  parameter int unsigned IN_W  = 9,   // signed input sample width
  parameter int unsigned FRAC  = 16,  // fractional bits of the running mean
  parameter int unsigned SHIFT = 8,   // averaging time constant, 2^SHIFT samples
  localparam int unsigned OUT_W = IN_W + FRAC + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid_i,
  input  logic signed [IN_W-1:0]  in_i,
  output logic                    out_valid_o,
  output logic signed [OUT_W-1:0] out_o
);

  logic signed [OUT_W-1:0] mean_q;
  logic signed [OUT_W-1:0] s_ext, diff;

  always_comb begin
    s_ext = OUT_W'(in_i) <<< FRAC;
    diff  = s_ext - mean_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mean_q      <= '0;
      out_valid_o <= 1'b0;
      out_o       <= '0;
    end else begin
      out_valid_o <= in_valid_i;
      if (in_valid_i) begin
        out_o  <= diff;
        mean_q <= mean_q + (diff >>> SHIFT);
      end
    end
  end

endmodule
