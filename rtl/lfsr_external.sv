// lfsr_external: Fibonacci ("external") linear feedback shift register.
//
// D one-bit storage registers r[D-1] (left, input end) .. r[0] (right, output end)
// hold the D most recent members u[n] .. u[n+D-1] of the bit sequence
//   u[n+D] = XOR of u[n+i] over every i with TAPS[i] = 1.
// Each enabled clock shifts the register one place to the right: the output
// bit_o = r[0] = u[n] leaves, and the feedback (or, while load_i is high, the
// serial seed bit din_i) enters on the left.  Shifting in the seed
// 0,0,0,0,0,1 (first bit first) into the default 6-register, 5-tap example gives
// the impulse-response sequence with period 30 on bit_o, one bit per clock,
// starting with the first seed bit.
//
// The feedback is a chain of XOR gates over the tapped registers, so its delay
// grows with the number of taps; that is the weakness of the external form.
// The register layout, the taps of the default and the seed-in-on-the-left
// convention follow the worked example; enable, load and reset are this
// design's own (reset clears the register, which is a fixed point until seeded).
module lfsr_external #(
  parameter int unsigned D    = prng_pkg::EX_D,
  parameter logic [D-1:0] TAPS = prng_pkg::EX_TAPS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en_i,     // advance one step
  input  logic load_i,   // with en_i: shift din_i in instead of the feedback
  input  logic din_i,    // serial seed bit
  output logic bit_o     // current member u[n]
);

  logic [D-1:0] r;
  logic         fb;

  // XOR chain over the tapped registers.
  always_comb begin
    fb = 1'b0;
    for (int i = 0; i < int'(D); i++) begin
      if (TAPS[i]) fb = fb ^ r[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0;
    end else if (en_i) begin
      r <= {load_i ? din_i : fb, r[D-1:1]};
    end
  end

  assign bit_o = r[0];

endmodule
