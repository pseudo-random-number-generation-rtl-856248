// tb_lrs_internal_seg: segmented internal-form generators.  The default one
// (1024-bit words, 64-bit segments, example recurrence) and a narrow one
// (64-bit words, 8-bit segments, coefficients 3,3,1,1,1,0, so that multiplier
// carries are large) are seeded in six rounds with the word 1 followed by five
// zero words.  Each then presents u[5], u[6], ... once per round; every member
// is compared with the recurrence evaluated here, each round must last exactly
// S/SEG enabled clocks, and the segment output must step through the member's
// segments low first.  Random stalls (enable low) occur inside rounds and must
// not change the result.  Members whose low segment carries into the next are
// counted in the reference and must occur.
module tb_lrs_internal_seg;
  import prng_pkg::*;
  localparam int unsigned D = 6;
  localparam logic [D-1:0][COEF_W-1:0] COEF4 = '{2'd0, 2'd1, 2'd1, 2'd1, 2'd3, 2'd3};

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string what);
    failures++;
    if (failures < 10) $display("FAIL %s", what);
  endtask

  // ---- default instance --------------------------------------------------
  localparam int unsigned SA = 1024, GA = 64;
  logic en_a = 1'b0, load_a = 1'b0;
  logic [GA-1:0] din_a = '0, seg_a;
  logic [SA-1:0] u_a;
  logic          val_a;
  logic [3:0]    idx_a;
  lrs_internal_seg dut_a (.clk, .rst_n, .en_i(en_a), .load_i(load_a), .din_seg_i(din_a),
                          .u_o(u_a), .u_seg_o(seg_a), .word_valid_o(val_a), .seg_o(idx_a));

  // ---- narrow instance -----------------------------------------------------
  localparam int unsigned SB = 64, GB = 8;
  logic en_b = 1'b0, load_b = 1'b0;
  logic [GB-1:0] din_b = '0, seg_b;
  logic [SB-1:0] u_b;
  logic          val_b;
  logic [2:0]    idx_b;
  lrs_internal_seg #(.S(SB), .SEG(GB), .COEF(COEF4)) dut_b (
    .clk, .rst_n, .en_i(en_b), .load_i(load_b), .din_seg_i(din_b),
    .u_o(u_b), .u_seg_o(seg_b), .word_valid_o(val_b), .seg_o(idx_b));

  // Reference sequences, and for the narrow instance the number of members
  // whose sum carries out of the lowest segment (the carry path is needed).
  logic [SA-1:0] ra [$];
  logic [SB-1:0] rb [$];
  int carries_a = 0, carries_b = 0;

  initial begin
    for (int i = 0; i < int'(D); i++) begin
      ra.push_back((i == int'(D) - 1) ? SA'(1) : '0);
      rb.push_back((i == int'(D) - 1) ? SB'(1) : '0);
    end
    for (int n = 0; n < 1900; n++) begin
      logic [SA-1:0] acc;
      logic [SB-1:0] accb;
      int b;
      b = ra.size() - int'(D);
      acc = '0;
      for (int i = 0; i < int'(D); i++) acc = acc + ra[b+i] * SA'(EX_COEF[i]);
      ra.push_back(acc);
      accb = '0;
      for (int i = 0; i < int'(D); i++) accb = accb + rb[b+i] * SB'(COEF4[i]);
      rb.push_back(accb);
      // does the low segment of this member's sum carry into the next one?
      begin
        int lo;
        lo = 0;
        for (int i = 0; i < int'(D); i++) lo += int'(rb[b+i][GB-1:0]) * int'(COEF4[i]);
        if (n < 300 && lo >= (1 << GB)) carries_b++;
      end
    end
  end

  // Run one instance: seed, then NW members with random stalls.
  task automatic run_a(input int nw);
    int cyc, m;
    // seeding rounds
    for (int w = 0; w < int'(D); w++) begin
      for (int j = 0; j < int'(SA / GA); j++) begin
        @(negedge clk);
        en_a = 1'b1; load_a = (j == 0); din_a = (w == 0 && j == 0) ? GA'(1) : '0;
      end
    end
    @(negedge clk); en_a = 1'b0; load_a = 1'b0; din_a = '0;
    m = int'(D) - 1;
    cyc = 0;
    while (m < int'(D) - 1 + nw) begin
      // state after the last edge
      if (val_a && cyc == 0) begin
        checks++;
        if (u_a !== ra[m]) fail($sformatf("A member %0d", m));
      end
      checks++;
      if (seg_a !== ra[m][GA*idx_a +: GA] || idx_a != 4'(cyc)) fail($sformatf("A segment %0d of %0d", idx_a, m));
      if ($urandom_range(7) == 0) begin
        en_a = 1'b0;
      end else begin
        en_a = 1'b1;
        cyc++;
        if (cyc == int'(SA / GA)) begin cyc = 0; m++; end
      end
      @(negedge clk);
      en_a = 1'b0;
      checks++;
      if (val_a != (cyc == 0)) fail($sformatf("A round length at member %0d", m));
    end
  endtask

  task automatic run_b(input int nw);
    int cyc, m;
    for (int w = 0; w < int'(D); w++) begin
      for (int j = 0; j < int'(SB / GB); j++) begin
        @(negedge clk);
        en_b = 1'b1; load_b = (j == 0); din_b = (w == 0 && j == 0) ? GB'(1) : '0;
      end
    end
    @(negedge clk); en_b = 1'b0; load_b = 1'b0; din_b = '0;
    m = int'(D) - 1;
    cyc = 0;
    while (m < int'(D) - 1 + nw) begin
      if (val_b && cyc == 0) begin
        checks++;
        if (u_b !== rb[m]) fail($sformatf("B member %0d", m));
      end
      if ($urandom_range(5) == 0) begin
        en_b = 1'b0;
      end else begin
        en_b = 1'b1;
        cyc++;
        if (cyc == int'(SB / GB)) begin cyc = 0; m++; end
      end
      @(negedge clk);
      en_b = 1'b0;
      checks++;
      if (val_b != (cyc == 0)) fail($sformatf("B round length at member %0d", m));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1;
    fork
      run_a(1800);
      run_b(300);
    join
    checks++;
    if (carries_b == 0) fail("no segment carry seen");
    $display("narrow members with a carry out of segment 0: %0d", carries_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
