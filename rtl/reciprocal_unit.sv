// Reciprocal precalculation for the skew tent map.
//
// Computes r = 1/d for a Q0.64 divisor d in (0,1), as a Q64.64 number: r = floor(2^128/d),
// saturated to 2^128-1 (only d = 2^-64 would need more). The key schedule of the cipher
// calls it twice per session, for gamma and for 1-gamma, so the map itself needs no
// divider. The document only says that both values are precalculated when the cipher is
// initialised; a bit-serial restoring divider is the simplest circuit that does it.
//
// Interface: pulse start_i with divisor_i (must be non-zero) held or not; the divisor is
// captured. busy_o is high for QBITS = 129 cycles, then done_o pulses for one cycle and
// recip_o holds the result until the next start.
module reciprocal_unit
  import stm_cipher_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start_i,
  input  frac_t  divisor_i,
  output logic   busy_o,
  output logic   done_o,
  output recip_t recip_o
);

  // The dividend 2^128 has 129 bits: one '1' followed by 128 zeros.
  localparam int unsigned QBITS = RECIP_W + 1;
  localparam int unsigned CNT_W = $clog2(QBITS + 1);

  frac_t              d_q;
  frac_t              rem_q;     // partial remainder, always < d
  logic [QBITS-1:0]   quo_q;
  logic [CNT_W-1:0]   cnt_q;     // dividend bits still to process
  logic               busy_q, done_q;

  logic [PREC:0]      rem_sh;
  logic               fits;

  always_comb begin
    // Bring down the next dividend bit: 1 for the first (most significant) bit, else 0.
    rem_sh = {rem_q, (cnt_q == CNT_W'(QBITS))};
    fits   = (rem_sh >= {1'b0, d_q});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q    <= '0;
      rem_q  <= '0;
      quo_q  <= '0;
      cnt_q  <= '0;
      busy_q <= 1'b0;
      done_q <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (start_i) begin
        d_q    <= divisor_i;
        rem_q  <= '0;
        quo_q  <= '0;
        cnt_q  <= CNT_W'(QBITS);
        busy_q <= 1'b1;
      end else if (busy_q) begin
        rem_q <= fits ? frac_t'(rem_sh - {1'b0, d_q}) : frac_t'(rem_sh);
        quo_q <= {quo_q[QBITS-2:0], fits};
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == 1) begin
          busy_q <= 1'b0;
          done_q <= 1'b1;
        end
      end
    end
  end

  assign busy_o  = busy_q;
  assign done_o  = done_q;
  assign recip_o = quo_q[QBITS-1] ? '1 : quo_q[RECIP_W-1:0];

endmodule
