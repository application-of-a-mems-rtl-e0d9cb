// STM-LFSR keystream generator.
//
// A skew tent map produces x(i+1) = f(x~(i)); the least significant bit of each new value is
// XORed with the output bit of a 61st-order LFSR, giving the perturbed value x~(i+1) that is
// fed back into the map. The perturbation lifts the period of the digitised map to at
// least 2^61. Only the eight least significant bits of x~(i+1) leave the block as the
// keystream byte, so an observer sees 8 of the 64 state bits.
//
// Key load: seed_load_i captures gamma, x0 and y0, loads the map register and the LFSR, and
// starts two reciprocal units that compute 1/gamma and 1/(1-gamma) in parallel. ready_o
// rises when both have finished (131 cycles after the load) and stays high until the next
// load. A gamma of 0, which the map does not allow, is replaced by the smallest non-zero
// value 2^-64.
//
// Running: while ready_o is high, ks_o is the next keystream byte, combinational from the
// current state; step_i accepts it and advances the map and the LFSR by one iteration in
// the same clock. One byte per clock is the generator's full rate.
//
// LFSR pairing (this design's convention): the LFSR's current LSB perturbs the value being
// formed, then the LFSR shifts, so the first keystream byte uses the LSB of y0.
module chaotic_generator
  import stm_cipher_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              seed_load_i,
  input  seed_t             seed_i,
  output logic              ready_o,
  input  logic              step_i,
  output logic [BYTE_W-1:0] ks_o,
  output logic              left_branch_o,  // current iteration uses x/gamma
  output logic              lsb_flip_o      // current iteration's LFSR bit is 1
);

  frac_t  gamma_q;
  recip_t recip_g, recip_1mg;
  logic   busy_g, busy_1mg, done_g, done_1mg;
  logic   have_g_q, have_1mg_q;
  logic   ready_q;
  frac_t  gamma_in;
  logic   step;

  assign gamma_in = (seed_i.gamma == '0) ? frac_t'(1) : seed_i.gamma;
  assign step     = step_i && ready_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gamma_q    <= '0;
      have_g_q   <= 1'b0;
      have_1mg_q <= 1'b0;
      ready_q    <= 1'b0;
    end else if (seed_load_i) begin
      gamma_q    <= gamma_in;
      have_g_q   <= 1'b0;
      have_1mg_q <= 1'b0;
      ready_q    <= 1'b0;
    end else begin
      if (done_g)   have_g_q   <= 1'b1;
      if (done_1mg) have_1mg_q <= 1'b1;
      if (have_g_q && have_1mg_q && !ready_q) ready_q <= 1'b1;
    end
  end

  // 1 - gamma in Q0.64 is the two's complement of gamma (gamma is never 0 here).
  frac_t one_minus_gamma;
  assign one_minus_gamma = frac_t'(-gamma_in);

  reciprocal_unit u_recip_g (
    .clk, .rst_n,
    .start_i  (seed_load_i),
    .divisor_i(gamma_in),
    .busy_o   (busy_g),
    .done_o   (done_g),
    .recip_o  (recip_g)
  );

  reciprocal_unit u_recip_1mg (
    .clk, .rst_n,
    .start_i  (seed_load_i),
    .divisor_i(one_minus_gamma),
    .busy_o   (busy_1mg),
    .done_o   (done_1mg),
    .recip_o  (recip_1mg)
  );

  logic  y_lsb;
  frac_t x_cur, x_next, x_tilde;

  lfsr61 u_lfsr (
    .clk, .rst_n,
    .load_i (seed_load_i),
    .seed_i (seed_i.y0),
    .step_i (step),
    .lsb_o  (y_lsb),
    .state_o()
  );

  skew_tent_map u_stm (
    .clk, .rst_n,
    .load_i       (seed_load_i),
    .x0_i         (seed_i.x0),
    .step_i       (step),
    .x_tilde_i    (x_tilde),
    .gamma_i      (gamma_q),
    .recip_g_i    (recip_g),
    .recip_1mg_i  (recip_1mg),
    .x_o          (x_cur),
    .x_next_o     (x_next),
    .left_branch_o(left_branch_o)
  );

  assign x_tilde    = {x_next[PREC-1:1], x_next[0] ^ y_lsb};
  assign ks_o       = x_tilde[BYTE_W-1:0];
  assign ready_o    = ready_q;
  assign lsb_flip_o = y_lsb;

  // The reciprocal units are started together and take the same number of cycles.
  a_recip_lockstep: assert property (@(posedge clk) disable iff (!rst_n) busy_g == busy_1mg);

endmodule
