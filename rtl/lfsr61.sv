// 61st-order linear feedback shift register.
//
// Its period, 2^61 - 1, is a Mersenne prime, which is what lets the perturbed skew tent
// map sequence be proven to have a period of at least 2^61. The document gives the order
// but not the feedback polynomial; this design uses the primitive pentanomial
// p(x) = x^61 + x^5 + x^2 + x + 1 in Fibonacci form. With s[0] the oldest bit, the output
// sequence obeys s(k+61) = s(k+5) ^ s(k+2) ^ s(k+1) ^ s(k).
//
// Interface: load_i writes the seed (an all-zero seed, the one lock-up state, is replaced
// by 1); step_i shifts once. lsb_o is the least significant state bit, used to perturb
// the map, and is valid from the cycle after the load.
module lfsr61
  import stm_cipher_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load_i,
  input  lfsr_t seed_i,
  input  logic  step_i,
  output logic  lsb_o,
  output lfsr_t state_o
);

  lfsr_t s_q;
  logic  fb;

  assign fb = s_q[0] ^ s_q[1] ^ s_q[2] ^ s_q[5];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      s_q <= lfsr_t'(1);
    else if (load_i) s_q <= (seed_i == '0) ? lfsr_t'(1) : seed_i;
    else if (step_i) s_q <= {fb, s_q[LFSR_N-1:1]};
  end

  assign lsb_o   = s_q[0];
  assign state_o = s_q;

endmodule
