// lrs_external: linear recurring sequence generator in external form.
//
// Produces the sequence u[n+D] = a[D-1] u[n+D-1] + ... + a[0] u[n]  (mod 2^S)
// of S-bit integers.  D S-bit storage registers r[D-1] (input end) .. r[0]
// (output end) hold u[n+D-1] .. u[n]; each term a[i] r[i] is formed by a
// constant multiplier and the D terms are summed modulo 2^S, either by a serial
// chain of adders (NET = NET_CHAIN) or by a balanced adder tree
// (NET = NET_TREE, see lrs_sum_tree).  Each enabled clock shifts the registers
// towards the output and writes the new member (or, while load_i is high, the
// seed word din_i) into r[D-1].  Seeding takes D clocks; afterwards u_o gives
// u[0], u[1], ... one member per clock, u[0] being the first seed word.
//
// The coefficients are parameters (COEF[i] = a[i]), so multiplications by 0
// and 1 vanish in synthesis and a sparse recurrence costs only as many adders
// as it has nonzero coefficients.  The register/multiplier/adder structure and
// the two summing networks follow the document; the serial seeding port, enable
// and reset (registers cleared) are this design's own.
module lrs_external
  import prng_pkg::*;
#(
  parameter int unsigned           S    = WORD_W,
  parameter int unsigned           D    = EX_D,
  parameter int unsigned           CW   = COEF_W,
  parameter logic [D-1:0][CW-1:0]  COEF = EX_COEF,
  parameter net_e                  NET  = NET_CHAIN
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en_i,    // advance one step
  input  logic         load_i,  // with en_i: shift din_i in instead of the new member
  input  logic [S-1:0] din_i,   // seed word
  output logic [S-1:0] u_o      // current member u[n]
);

  logic [D-1:0][S-1:0] r;       // r[i] = u[n+i]
  logic [D-1:0][S-1:0] term;    // a[i] * u[n+i] mod 2^S
  logic [S-1:0]        next_u;  // u[n+D]

  always_comb begin
    for (int i = 0; i < int'(D); i++) begin
      term[i] = r[i] * S'(COEF[i]);
    end
  end

  if (NET == NET_TREE) begin : g_tree
    lrs_sum_tree #(.N(D), .W(S)) u_tree (
      .terms_i(term),
      .sum_o  (next_u)
    );
  end else begin : g_chain
    // Serial chain: each adder takes the previous partial sum and one term.
    always_comb begin
      next_u = term[0];
      for (int i = 1; i < int'(D); i++) begin
        next_u = next_u + term[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0;
    end else if (en_i) begin
      for (int i = 0; i < int'(D) - 1; i++) begin
        r[i] <= r[i+1];
      end
      r[D-1] <= load_i ? din_i : next_u;
    end
  end

  assign u_o = r[0];

endmodule
