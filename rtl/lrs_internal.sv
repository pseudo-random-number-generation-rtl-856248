// lrs_internal: linear recurring sequence generator in internal form.
//
// Produces the same sequence as lrs_external,
//   u[n+D] = a[D-1] u[n+D-1] + ... + a[0] u[n]  (mod 2^S),
// but stores partial sums instead of past members.  Register v[i] holds
//   v[i] = a[0] u[n-1-i] + a[1] u[n-i] + ... + a[i] u[n-1],
// so v[D-1] is the current member u[n].  Every enabled clock performs
//   v[0] <= a[0] u[n],   v[i] <= v[i-1] + a[i] u[n]   (i = 1 .. D-1),
// i.e. one constant multiplier and at most one adder lie between any two
// registers and a new member appears every clock whatever the order D.
// With S = 1 and 0/1 coefficients this is the internal (Galois) LFSR.
//
// Seeding: while load_i is high the feedback is switched off and the registers
// form a plain shift chain, din_i entering v[0].  Shifting in a 1 followed by
// D-1 zeros leaves v[D-1] = 1 and all other partial sums 0; the generator then
// gives the impulse-response sequence from its member u[D-1] = 1 on, i.e. the
// external form's output without its D-1 leading zeros.
//
// The partial-sum structure follows the document; the seeding scheme, enable
// and reset (registers cleared) are this design's own.
module lrs_internal
  import prng_pkg::*;
#(
  parameter int unsigned           S    = WORD_W,
  parameter int unsigned           D    = EX_D,
  parameter int unsigned           CW   = COEF_W,
  parameter logic [D-1:0][CW-1:0]  COEF = EX_COEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en_i,    // advance one step
  input  logic         load_i,  // with en_i: shift din_i into v[0], no feedback
  input  logic [S-1:0] din_i,   // seed word
  output logic [S-1:0] u_o      // current member u[n] = v[D-1]
);

  logic [D-1:0][S-1:0] v;
  logic [D-1:0][S-1:0] fb;      // a[i] * u[n], zero while loading

  always_comb begin
    for (int i = 0; i < int'(D); i++) begin
      fb[i] = load_i ? '0 : v[D-1] * S'(COEF[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= '0;
    end else if (en_i) begin
      v[0] <= load_i ? din_i : fb[0];
      for (int i = 1; i < int'(D); i++) begin
        v[i] <= v[i-1] + fb[i];
      end
    end
  end

  assign u_o = v[D-1];

endmodule
