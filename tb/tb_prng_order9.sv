// tb_prng_order9: the generator set for a second recurrence, of order 9.
// Q(x) = x^7 + x + 1 is irreducible over GF(2), so P(x) = (x^2+1) Q(x) =
// x^9 - x^7 - x^3 - x^2 - x - 1 (coefficients a8..a0 = 0,1,0,0,0,1,1,1,1) has an
// impulse response of period 2^8 - 2 = 254 modulo 2, and P itself is the
// variant that is uniformly distributed modulo 2^s.  The top is built with
// 16-bit words and 4-bit segments.  Checked: every output against the
// recurrence evaluated here; 127 ones in one LFSR period of 254; each 4-bit
// value exactly 127 times in the low bits of the first 2032 members, and the
// 4-bit sequence back at its start after 2032 members.
module tb_prng_order9;
  localparam int unsigned S = 16, SEG = 4, D = 9, CW = 2;
  localparam logic [D-1:0][CW-1:0] COEF9 = '{2'd0, 2'd1, 2'd0, 2'd0, 2'd0, 2'd1, 2'd1, 2'd1, 2'd1};
  localparam int NREF = 2300;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, run = 1'b0;
  logic words_ready, lfsr_ext, lfsr_int, seg_ready, seg_valid;
  logic [S-1:0] ext_chain, ext_tree, int_u, u_seg;
  logic [SEG-1:0] seg_part;

  prng_top #(.S(S), .SEG(SEG), .D(D), .CW(CW), .COEF(COEF9)) dut (
    .clk, .rst_n, .start_i(start), .run_i(run),
    .words_ready_o(words_ready), .lfsr_ext_o(lfsr_ext), .lfsr_int_o(lfsr_int),
    .ext_chain_o(ext_chain), .ext_tree_o(ext_tree), .int_o(int_u),
    .seg_ready_o(seg_ready), .seg_valid_o(seg_valid), .u_seg_o(u_seg), .seg_part_o(seg_part)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [S-1:0] got, input logic [S-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [S-1:0] r [NREF];

  initial begin
    for (int n = 0; n < NREF; n++) begin
      if (n < int'(D)) r[n] = (n == int'(D) - 1) ? S'(1) : '0;
      else begin
        r[n] = '0;
        for (int i = 0; i < int'(D); i++) r[n] = r[n] + r[n-int'(D)+i] * S'(COEF9[i]);
      end
    end
  end

  initial begin
    int w, m, k, ones, bad;
    int cnt [16];
    w = 0; m = 0; k = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!(words_ready && seg_ready)) begin
      if (words_ready) begin
        // words already run while the segmented generator is still seeding
        w++;
      end
      run = 1'b1;
      @(negedge clk);
    end
    // seg generator just became ready: the word generators are w members ahead
    while (m < 2100) begin
      if (w + int'(D) < NREF) begin
        check(ext_chain, r[w], $sformatf("chain u[%0d]", w));
        check(ext_tree,  r[w], $sformatf("tree u[%0d]", w));
        check(S'(lfsr_ext), S'(r[w][0]), $sformatf("LFSR ext u[%0d]", w));
        check(int_u, r[w+int'(D)-1], $sformatf("internal u[%0d]", w + int'(D) - 1));
        check(S'(lfsr_int), S'(r[w+int'(D)-1][0]), $sformatf("LFSR int u[%0d]", w + int'(D) - 1));
      end
      checks++;
      if (seg_valid != (k == 0)) begin failures++; $display("FAIL seg round position"); end
      if (k == 0) check(u_seg, r[m+int'(D)-1], $sformatf("segmented u[%0d]", m + int'(D) - 1));
      check(S'(seg_part), S'(r[m+int'(D)-1][SEG*k +: SEG]), "segment stream");
      run = ($urandom_range(9) != 0);
      if (run) begin
        w++;
        k++;
        if (k == int'(S / SEG)) begin k = 0; m++; end
      end
      @(negedge clk);
    end
    // properties of the reference itself (the theory the generator relies on)
    ones = 0;
    for (int n = 0; n < 254; n++) ones += int'(r[n][0]);
    checks++;
    if (ones != 127) begin failures++; $display("FAIL %0d ones in one LFSR period", ones); end
    for (int v = 0; v < 16; v++) cnt[v] = 0;
    for (int n = 0; n < 2032; n++) cnt[r[n][3:0]]++;
    bad = 0;
    for (int v = 0; v < 16; v++) if (cnt[v] != 127) bad++;
    for (int i = 0; i < int'(D); i++) if (r[2032+i][3:0] != r[i][3:0]) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("FAIL 4-bit distribution or period"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
