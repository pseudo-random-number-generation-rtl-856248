// tb_prng_top: end-to-end test of the generator set at its default sizes
// (1024-bit words, 64-bit segments, the order-6 example recurrence).
// After start_i every generator must follow the impulse-response sequence
// evaluated here: the external forms from u[0], the internal forms from u[5],
// the LFSRs as the low bit of it, the segmented form one member per 16 clocks.
// run_i is dropped at random (stalls); the generators are restarted twice, once
// at a round boundary of the segmented generator and once inside a round (the
// restart then waits for the round to finish).  Counted, and each required at
// least once: stalls, both kinds of restart, seeding phases, members that wrap
// modulo 2^1024 in the one-per-clock and in the segmented generators, and LFSR
// bits checked against the bit 30 places earlier (period 30).
module tb_prng_top;
  import prng_pkg::*;
  localparam int unsigned S = WORD_W, SEG = SEG_W, D = EX_D;
  localparam int unsigned NSEG = S / SEG;
  localparam int NREF = 42000;
  localparam int NCYC = 40000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, run = 1'b0;
  logic words_ready, lfsr_ext, lfsr_int, seg_ready, seg_valid;
  logic [S-1:0] ext_chain, ext_tree, int_u, u_seg;
  logic [SEG-1:0] seg_part;

  prng_top dut (
    .clk, .rst_n, .start_i(start), .run_i(run),
    .words_ready_o(words_ready), .lfsr_ext_o(lfsr_ext), .lfsr_int_o(lfsr_int),
    .ext_chain_o(ext_chain), .ext_tree_o(ext_tree), .int_o(int_u),
    .seg_ready_o(seg_ready), .seg_valid_o(seg_valid), .u_seg_o(u_seg), .seg_part_o(seg_part)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_restart_now = 0, n_restart_wait = 0, n_seed_w = 0, n_seed_s = 0;
  int n_wrap_w = 0, n_wrap_s = 0, n_period = 0;

  initial begin
    repeat (NCYC + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [S-1:0] got, input logic [S-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got[63:0], exp[63:0]);
    end
  endtask

  // Reference: IR sequence modulo 2^S, and whether member n wrapped.
  logic [S-1:0] r [NREF];
  bit           wrapped [NREF];

  initial begin
    for (int n = 0; n < NREF; n++) begin
      logic [S+3:0] acc;
      wrapped[n] = 1'b0;
      if (n < int'(D)) begin
        r[n] = (n == int'(D) - 1) ? S'(1) : '0;
      end else begin
        acc = '0;
        for (int i = 0; i < int'(D); i++) begin
          logic [S+3:0] t;
          int j;
          j = n - int'(D) + i;
          t = '0;
          t[S-1:0] = r[j];
          acc = acc + t * (S+4)'(EX_COEF[i]);
        end
        r[n] = acc[S-1:0];
        wrapped[n] = (acc[S+3:S] != 0);
      end
    end
  end

  initial begin
    int w, m, k;
    bit was_wr, was_sr;
    w = 0; m = 0; k = 0; was_wr = 0; was_sr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int c = 0; c < NCYC; c++) begin
      // ---- observe the state after the last clock edge
      if (words_ready && !was_wr) begin w = 0; n_seed_w++; end
      if (seg_ready && !was_sr)   begin m = 0; k = 0; n_seed_s++; end
      was_wr = words_ready;
      was_sr = seg_ready;
      if (words_ready && w + int'(D) < NREF) begin
        check(ext_chain, r[w], $sformatf("chain u[%0d]", w));
        check(ext_tree,  r[w], $sformatf("tree u[%0d]", w));
        check(S'(lfsr_ext), S'(r[w][0]), $sformatf("LFSR ext u[%0d]", w));
        check(int_u,     r[w+int'(D)-1], $sformatf("internal u[%0d]", w + int'(D) - 1));
        check(S'(lfsr_int), S'(r[w+int'(D)-1][0]), $sformatf("LFSR int u[%0d]", w + int'(D) - 1));
        if (w >= 30) begin
          check(S'(lfsr_ext), S'(r[w-30][0]), "LFSR period 30");
          n_period++;
        end
        if (wrapped[w]) n_wrap_w++;
      end
      if (seg_ready) begin
        checks++;
        if (seg_valid != (k == 0)) begin failures++; $display("FAIL seg round position %0d", k); end
        if (k == 0) begin
          check(u_seg, r[m+int'(D)-1], $sformatf("segmented u[%0d]", m + int'(D) - 1));
          if (wrapped[m+int'(D)-1]) n_wrap_s++;
        end
        check(S'(seg_part), S'(r[m+int'(D)-1][SEG*k +: SEG]), "segment stream");
      end
      // ---- drive the next clock
      run = ($urandom_range(15) != 0);
      start = 1'b0;
      if (c == 3001 || (c > 9000 && n_restart_now == 0 && seg_ready && k == 0)) begin
        start = 1'b1;
        if (seg_ready && k != 0) n_restart_wait++;
        else n_restart_now++;
        if (c == 3001 && k == 0) begin start = 1'b0; n_restart_now--; end
      end
      if (c > 3001 && c < 4000 && n_restart_wait == 0 && seg_ready && k != 0) begin
        start = 1'b1;
        n_restart_wait++;
      end
      if ((words_ready || seg_ready) && !run) n_stall++;
      if (words_ready && run) w++;
      if (seg_ready && run) begin
        k++;
        if (k == int'(NSEG)) begin k = 0; m++; end
      end
      @(negedge clk);
    end
    run = 1'b0;
    $display("stalls=%0d restarts(at boundary)=%0d restarts(waiting)=%0d seedings=%0d/%0d",
             n_stall, n_restart_now, n_restart_wait, n_seed_w, n_seed_s);
    $display("wrapped members: one-per-clock=%0d segmented=%0d  LFSR period checks=%0d",
             n_wrap_w, n_wrap_s, n_period);
    if (n_stall == 0)        begin failures++; $display("FAIL no stall"); end
    if (n_restart_now == 0)  begin failures++; $display("FAIL no restart at a round boundary"); end
    if (n_restart_wait == 0) begin failures++; $display("FAIL no restart inside a round"); end
    if (n_seed_w < 3 || n_seed_s < 3) begin failures++; $display("FAIL seeding phases"); end
    if (n_wrap_w == 0)       begin failures++; $display("FAIL no wrap (one per clock)"); end
    if (n_wrap_s == 0)       begin failures++; $display("FAIL no wrap (segmented)"); end
    if (n_period == 0)       begin failures++; $display("FAIL no LFSR period check"); end
    checks += 7;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
