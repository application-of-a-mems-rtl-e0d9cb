// Shared widths and types of the STM-LFSR stream cipher and its seed generator.
//
// The cipher state is a 64-bit unsigned fixed-point fraction (Q0.64), so the chaotic
// parameter gamma and the initial value x0 both lie in [0,1). The perturbing LFSR is of
// order 61, which makes the key 64 + 64 + 61 = 189 bits. The precalculated reciprocals
// 1/gamma and 1/(1-gamma) are kept as Q64.64 numbers (64 integer bits, 64 fraction
// bits), wide enough for any non-zero 64-bit gamma; that format is this design's choice.
package stm_cipher_pkg;

  localparam int unsigned PREC      = 64;        // fixed-point precision of x and gamma
  localparam int unsigned LFSR_N    = 61;        // order of the perturbing LFSR
  localparam int unsigned RECIP_W   = 2 * PREC;  // Q64.64 reciprocal width
  localparam int unsigned BYTE_W    = 8;         // keystream bits used per iteration

  typedef logic [PREC-1:0]    frac_t;   // Q0.64 value in [0,1)
  typedef logic [RECIP_W-1:0] recip_t;  // Q64.64 reciprocal
  typedef logic [LFSR_N-1:0]  lfsr_t;

  // Session key: the three initial parameters of the generator.
  typedef struct packed {
    frac_t gamma;  // chaotic parameter of the skew tent map
    frac_t x0;     // initial value of the map
    lfsr_t y0;     // initial LFSR state
  } seed_t;

endpackage
