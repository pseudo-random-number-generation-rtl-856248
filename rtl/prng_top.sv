// prng_top: pseudo random number generators built on one linear recurrence.
//
// All generators realise the recurrence with coefficients COEF (default: the
// order-6 example u[n+6] = u[n+4]+u[n+3]+u[n+2]+u[n+1]+u[n]) from the impulse-
// response (IR) start u[0..D-2] = 0, u[D-1] = 1:
//   * lfsr_ext / lfsr_int : the sequence modulo 2 as an external and an internal
//                           LFSR (one bit per clock; period 30 for the default);
//   * ext_chain / ext_tree: the sequence modulo 2^S in external form, summed by
//                           an adder chain or by an adder tree;
//   * int                 : the sequence modulo 2^S in internal form;
//   * seg                 : the sequence modulo 2^S in internal form with SEG-bit
//                           segmented adders, one member every S/SEG clocks.
// A pulse on start_i makes a small sequencer seed every generator with the IR
// start: the external forms get D seed words 0,..,0,1 (D clocks), the internal
// forms a 1 followed by D-1 zeros (D clocks; the segmented one D rounds of S/SEG
// clocks).  When seeding ends words_ready_o / seg_ready_o rise and the
// generators advance while run_i is high (run_i low stalls them).  Once ready,
// the external forms present u[0], u[1], ... and the internal forms u[D-1],
// u[D], ... (the IR sequence without its D-1 leading zeros); the segmented form
// presents a complete member in u_seg_o whenever seg_valid_o is high, and
// seg_part_o shows the segment of it that the adders are processing.
// The generator structures follow the document; the sequencer, the side-by-side
// arrangement and the run/stall control are this design's own.
module prng_top
  import prng_pkg::*;
#(
  parameter int unsigned           S    = WORD_W,
  parameter int unsigned           SEG  = SEG_W,
  parameter int unsigned           D    = EX_D,
  parameter int unsigned           CW   = COEF_W,
  parameter logic [D-1:0][CW-1:0]  COEF = EX_COEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_i,        // (re)seed all generators with the IR start
  input  logic         run_i,          // advance while high once ready
  output logic         words_ready_o,  // one-member-per-clock generators seeded
  output logic         lfsr_ext_o,     // u[n] mod 2, external LFSR
  output logic         lfsr_int_o,     // u[n+D-1] mod 2, internal LFSR
  output logic [S-1:0] ext_chain_o,    // u[n], external form, adder chain
  output logic [S-1:0] ext_tree_o,     // u[n], external form, adder tree
  output logic [S-1:0] int_o,          // u[n+D-1], internal form
  output logic         seg_ready_o,    // segmented generator seeded
  output logic         seg_valid_o,    // u_seg_o holds a complete member
  output logic [S-1:0] u_seg_o,        // member of the segmented generator
  output logic [SEG-1:0] seg_part_o    // segment it is processing in this clock
);

  localparam int unsigned NSEG = S / SEG;
  localparam int unsigned DW   = $clog2(D > 1 ? D : 2);
  localparam int unsigned SW   = $clog2(NSEG > 1 ? NSEG : 2);

  // Taps of the LFSRs: coefficients modulo 2.
  function automatic logic [D-1:0] taps_of(logic [D-1:0][CW-1:0] c);
    for (int i = 0; i < int'(D); i++) taps_of[i] = c[i][0];
  endfunction
  localparam logic [D-1:0] TAPS = taps_of(COEF);

  typedef enum logic [1:0] {ST_IDLE, ST_SEED, ST_RUN} state_e;

  // ---------------- sequencer of the one-member-per-clock generators --------
  state_e        w_state;
  logic [DW-1:0] w_cnt;     // seed word index
  logic          w_en, w_load, w_din_ext, w_din_int;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_state <= ST_IDLE;
      w_cnt   <= '0;
    end else if (start_i) begin
      w_state <= ST_SEED;
      w_cnt   <= '0;
    end else if (w_state == ST_SEED) begin
      if (w_cnt == DW'(D - 1)) w_state <= ST_RUN;
      w_cnt <= w_cnt + 1'b1;
    end
  end

  assign w_load    = (w_state == ST_SEED);
  assign w_en      = w_load || ((w_state == ST_RUN) && run_i);
  assign w_din_ext = (w_cnt == DW'(D - 1));   // 0,...,0,1
  assign w_din_int = (w_cnt == '0);           // 1,0,...,0
  assign words_ready_o = (w_state == ST_RUN);

  // ---------------- sequencer of the segmented generator ---------------------
  state_e        s_state;
  logic [DW-1:0] s_word;    // seed word index
  logic          s_en, s_load, s_word_valid;
  logic [SW-1:0] s_seg;
  logic [SEG-1:0] s_din;
  logic          s_pend;    // start seen, waiting for a round boundary
  logic          s_start;   // start taken in this clock

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_state <= ST_IDLE;
      s_word  <= '0;
      s_pend  <= 1'b0;
    end else if ((start_i || s_pend) && s_seg != '0) begin
      s_pend  <= 1'b1;
    end else if (s_start) begin
      s_state <= ST_SEED;
      s_word  <= '0;
      s_pend  <= 1'b0;
    end else if (s_state == ST_SEED && s_seg == SW'(NSEG - 1)) begin
      if (s_word == DW'(D - 1)) s_state <= ST_RUN;
      s_word <= s_word + 1'b1;
    end
  end

  // A restart is only honoured at a round boundary of the segmented generator:
  // a round in progress is first completed (s_pend).
  // The clock in which the restart is taken does not advance the generator, so
  // the first seeding round starts cleanly at segment 0.
  assign s_start = (start_i || s_pend) && (s_seg == '0);
  assign s_load  = (s_state == ST_SEED) && !s_pend;
  assign s_en    = !s_start && (s_load || s_pend || ((s_state == ST_RUN) && run_i));
  assign s_din  = (s_word == '0 && s_seg == '0) ? SEG'(1) : '0;
  assign seg_ready_o = (s_state == ST_RUN) && !s_pend;
  assign seg_valid_o = seg_ready_o && s_word_valid;

  // ---------------- generators ------------------------------------------------
  lfsr_external #(.D(D), .TAPS(TAPS)) u_lfsr_ext (
    .clk, .rst_n, .en_i(w_en), .load_i(w_load), .din_i(w_din_ext), .bit_o(lfsr_ext_o)
  );

  lrs_internal #(.S(1), .D(D), .CW(CW), .COEF(COEF)) u_lfsr_int (
    .clk, .rst_n, .en_i(w_en), .load_i(w_load), .din_i(w_din_int), .u_o(lfsr_int_o)
  );

  lrs_external #(.S(S), .D(D), .CW(CW), .COEF(COEF), .NET(NET_CHAIN)) u_ext_chain (
    .clk, .rst_n, .en_i(w_en), .load_i(w_load), .din_i(S'(w_din_ext)), .u_o(ext_chain_o)
  );

  lrs_external #(.S(S), .D(D), .CW(CW), .COEF(COEF), .NET(NET_TREE)) u_ext_tree (
    .clk, .rst_n, .en_i(w_en), .load_i(w_load), .din_i(S'(w_din_ext)), .u_o(ext_tree_o)
  );

  lrs_internal #(.S(S), .D(D), .CW(CW), .COEF(COEF)) u_int (
    .clk, .rst_n, .en_i(w_en), .load_i(w_load), .din_i(S'(w_din_int)), .u_o(int_o)
  );

  lrs_internal_seg #(.S(S), .SEG(SEG), .D(D), .CW(CW), .COEF(COEF)) u_seg (
    .clk, .rst_n, .en_i(s_en), .load_i(s_load), .din_seg_i(s_din),
    .u_o(u_seg_o), .u_seg_o(seg_part_o), .word_valid_o(s_word_valid), .seg_o(s_seg)
  );

endmodule
