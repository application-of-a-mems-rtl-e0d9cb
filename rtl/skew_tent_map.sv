// Skew Tent Map iteration in 64-bit fixed point.
//
// The map is f(x) = x/gamma for x <= gamma and (1-x)/(1-gamma) for x > gamma. Following
// the block diagram of the generator, the divisions are replaced by multiplications with
// the two reciprocals, which are computed once per key and held constant for the session:
// a comparator (x <= gamma) drives two multiplexers, one choosing x or 1-x, the other
// 1/gamma or 1/(1-gamma), and a single multiplier forms the next value.
//
// State register: holds the current (perturbed) value. It is loaded with x0 on load_i and
// takes x_tilde_i, the perturbed next value formed outside this block, on step_i.
// x_next_o = f(state) is combinational, so one iteration completes per clock.
//
// Number formats (this design's choice): x and gamma are Q0.64, the reciprocals Q64.64.
// The product x*r (Q64.128) is truncated to Q0.64; a result of 1.0 or more, which only
// the end point x = gamma can reach, saturates to the largest value below 1.
module skew_tent_map
  import stm_cipher_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load_i,         // load x0 into the state register
  input  frac_t  x0_i,
  input  logic   step_i,         // take x_tilde_i into the state register
  input  frac_t  x_tilde_i,      // perturbed next value (x_next_o with its LSB modified)
  input  frac_t  gamma_i,        // chaotic parameter, constant during a session
  input  recip_t recip_g_i,      // 1/gamma, Q64.64
  input  recip_t recip_1mg_i,    // 1/(1-gamma), Q64.64
  output frac_t  x_o,            // current state
  output frac_t  x_next_o,       // f(x_o)
  output logic   left_branch_o   // x_o <= gamma (first branch of the map taken)
);

  frac_t x_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      x_q <= '0;
    else if (load_i) x_q <= x0_i;
    else if (step_i) x_q <= x_tilde_i;
  end

  logic                    le_gamma;
  logic [PREC:0]           operand;     // x or 1-x, up to 1.0 in Q1.64
  recip_t                  recip_sel;
  logic [PREC+RECIP_W:0]   product;     // Q65.128

  always_comb begin
    le_gamma  = (x_q <= gamma_i);
    operand   = le_gamma ? {1'b0, x_q} : ({1'b1, {PREC{1'b0}}} - {1'b0, x_q});
    recip_sel = le_gamma ? recip_g_i : recip_1mg_i;
    product   = operand * recip_sel;
    // Keep the Q0.64 part: bits [2*PREC-1 : PREC]; saturate if the integer part is set.
    if (|product[PREC+RECIP_W:2*PREC]) x_next_o = '1;
    else                               x_next_o = product[2*PREC-1:PREC];
  end

  assign x_o           = x_q;
  assign left_branch_o = le_gamma;

endmodule
