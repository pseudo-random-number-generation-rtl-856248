// prng_pkg: constants shared by the linear recurring sequence (LRS) generators.
//
// The worked example is the order-6 recurrence
//   u[n+6] = u[n+4] + u[n+3] + u[n+2] + u[n+1] + u[n]
// whose characteristic polynomial x^6 - x^4 - x^3 - x^2 - x - 1 factors modulo 2
// as (x+1)^2 (x^4+x+1).  Reduced modulo 2 it is a 6-register LFSR with period 30;
// evaluated on S-bit integers (modulo 2^S) it is uniformly distributed for every
// number of low bits s, which makes its S-bit words pseudo random integers.
// Coefficients are stored as CW-bit unsigned numbers, index i holding a_i, so that
// the variants P(x)-2, P(x)-2x and P(x)-2x-2 (coefficients up to 3) also fit.
package prng_pkg;

  // Order of the example recurrence.
  localparam int unsigned EX_D = 6;

  // Width of one recurrence coefficient; 2 bits hold every value 0..3 that the
  // four candidate polynomials P_1..P_4 can give.
  localparam int unsigned COEF_W = 2;

  // Coefficients a_5..a_0 of the example (P_1 = P, the variant that is uniformly
  // distributed modulo 2^s for all s).
  localparam logic [EX_D-1:0][COEF_W-1:0] EX_COEF = '{
    2'd0,   // a_5
    2'd1,   // a_4
    2'd1,   // a_3
    2'd1,   // a_2
    2'd1,   // a_1
    2'd1    // a_0
  };

  // The same recurrence as single-bit taps for the plain LFSR: bit i is a_i mod 2.
  localparam logic [EX_D-1:0] EX_TAPS = 6'b01_1111;

  // Word width of the pseudo random integers.
  localparam int unsigned WORD_W = 1024;

  // Summing structure of the external-form generator: a serial chain of
  // adders, or a balanced tree ("operation network") of logarithmic depth.
  typedef enum logic {NET_CHAIN, NET_TREE} net_e;

  // Adder segment width of the segmented generator.
  localparam int unsigned SEG_W = 64;

endpackage
