// lrs_internal_seg: internal-form LRS generator with segmented wide adders.
//
// Same recurrence and partial-sum registers as lrs_internal,
//   v[0] <= a[0] u,   v[i] <= v[i-1] + a[i] u   (mod 2^S),   u = v[D-1],
// but S-bit adders are too large to place D of them, so every adder and
// constant multiplier handles one SEG-bit segment per clock.  Each register is
// a shift register of NSEG = S/SEG segments that rotates towards its low end:
// in clock j of a round the low segment of every register is its old segment j,
// the adder i forms
//   v[i-1] seg j + a[i] * (u seg j) + carry[i]
// (SEG+CW+1 bits), writes the low SEG bits as new segment j at the high end of
// v[i] and keeps the rest as carry[i] for segment j+1.  The carry out of the
// last segment is dropped (arithmetic modulo 2^S).  After NSEG clocks every
// register holds its next value, so one S-bit member is produced per NSEG
// clocks with D adders of SEG+CW+1 bits.
//
// Interface: word_valid_o is high in the first clock of a round (seg_o = 0);
// u_o then holds the whole current member u[n] and u_seg_o its segment being
// processed.  Rounds advance only while en_i is high.  A round that starts with
// load_i high is a seeding round: the feedback is off, din_seg_i supplies the
// NSEG segments (low first) of a word shifted into v[0], and every other
// register takes its lower neighbour.  Shifting in the word 1 followed by D-1
// zero words gives the impulse-response sequence from its member u[D-1] = 1 on.
//
// Processing a segment at a time and shifting the words through the adder
// chain follows the document; the segment width, the carry registers, the
// seeding rounds, enable and reset (registers cleared) are this design's own.
module lrs_internal_seg
  import prng_pkg::*;
#(
  parameter int unsigned           S    = WORD_W,
  parameter int unsigned           SEG  = SEG_W,
  parameter int unsigned           D    = EX_D,
  parameter int unsigned           CW   = COEF_W,
  parameter logic [D-1:0][CW-1:0]  COEF = EX_COEF
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en_i,         // advance one segment step
  input  logic           load_i,       // sampled at the start of a round: seeding round
  input  logic [SEG-1:0] din_seg_i,    // seed segment (low segment first)
  output logic [S-1:0]   u_o,          // current member, complete when word_valid_o
  output logic [SEG-1:0] u_seg_o,      // segment of the current member in this clock
  output logic           word_valid_o, // first clock of a round
  output logic [$clog2(S/SEG > 1 ? S/SEG : 2)-1:0] seg_o  // segment index in this clock
);

  localparam int unsigned NSEG = S / SEG;
  localparam int unsigned CNTW = $clog2(NSEG > 1 ? NSEG : 2);
  localparam int unsigned CRYW = CW + 1;

  if (S % SEG != 0) begin : g_bad_seg
    $error("lrs_internal_seg: SEG must divide S");
  end

  logic [D-1:0][S-1:0]    v;
  logic [D-1:0][CRYW-1:0] carry;
  logic [CNTW-1:0]        cnt;
  logic                   load_q;     // mode latched for the current round
  logic                   loading;    // mode in this clock
  logic                   last_seg;

  logic [SEG-1:0]                 seg_lo;
  logic [D-1:0][SEG+CRYW-1:0]     sum;

  assign last_seg = (cnt == CNTW'(NSEG - 1));
  assign loading  = (cnt == '0) ? load_i : load_q;
  assign seg_lo    = v[D-1][SEG-1:0];

  // One segment of every adder (and of its constant multiplier) per clock.
  always_comb begin
    for (int i = 0; i < int'(D); i++) begin
      if (loading) begin
        sum[i] = (i == 0) ? (SEG+CRYW)'(din_seg_i) : (SEG+CRYW)'(v[(i == 0) ? 0 : i-1][SEG-1:0]);
      end else begin
        sum[i] = (SEG+CRYW)'(seg_lo) * (SEG+CRYW)'(COEF[i]) + (SEG+CRYW)'(carry[i]);
        if (i > 0) sum[i] = sum[i] + (SEG+CRYW)'(v[(i == 0) ? 0 : i-1][SEG-1:0]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v      <= '0;
      carry  <= '0;
      cnt    <= '0;
      load_q <= 1'b0;
    end else if (en_i) begin
      for (int i = 0; i < int'(D); i++) begin
        // new segment in at the high end, the register moves down one segment
        v[i] <= S'({sum[i][SEG-1:0], v[i]} >> SEG);
        carry[i] <= (last_seg || loading) ? '0 : sum[i][SEG+CRYW-1:SEG];
      end
      cnt    <= last_seg ? '0 : cnt + 1'b1;
      load_q <= loading;
    end
  end

  assign u_o          = v[D-1];
  assign u_seg_o      = seg_lo;
  assign word_valid_o = (cnt == '0);
  assign seg_o        = cnt;

endmodule
