// tb_lrs_external: external-form LRS generators at the default 1024-bit word
// width, with the adder chain and the adder tree, for the example recurrence
// (coefficients 1,1,1,1,1,0) and for its variant P(x)-2x-2 (coefficients
// 3,3,1,1,1,0).  After the impulse-response seed 0,0,0,0,0,1 each output is
// compared member by member with the recurrence evaluated here; the low 4 bits
// of the example sequence must be uniformly distributed (each of the 16 values
// 15 times in the first 240 members) and the sequence must return to its seed
// after 240 members.  2000 members make the words wrap modulo 2^1024, which is
// counted.  A random seed and a stall are checked as well.
module tb_lrs_external;
  import prng_pkg::*;
  localparam int unsigned S = 1024;
  localparam int unsigned D = 6;
  localparam logic [D-1:0][COEF_W-1:0] COEF4 = '{2'd0, 2'd1, 2'd1, 2'd1, 2'd3, 2'd3};
  localparam int NMEM = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, load = 1'b0;
  logic [S-1:0] din = '0;
  logic [S-1:0] u_chain, u_tree, u4_chain, u4_tree;
  int checks = 0, failures = 0, wraps = 0;

  lrs_external                                  dut_chain (.clk, .rst_n, .en_i(en), .load_i(load), .din_i(din), .u_o(u_chain));
  lrs_external #(.NET(NET_TREE))                dut_tree  (.clk, .rst_n, .en_i(en), .load_i(load), .din_i(din), .u_o(u_tree));
  lrs_external #(.COEF(COEF4))                  dut4_chain(.clk, .rst_n, .en_i(en), .load_i(load), .din_i(din), .u_o(u4_chain));
  lrs_external #(.COEF(COEF4), .NET(NET_TREE))  dut4_tree (.clk, .rst_n, .en_i(en), .load_i(load), .din_i(din), .u_o(u4_tree));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  // Next member from the last D members, with 4 guard bits to see wrapping.
  function automatic logic [S+3:0] step(input logic [S-1:0] q [$], input logic [D-1:0][COEF_W-1:0] c);
    logic [S+3:0] acc;
    int b;
    acc = '0;
    b = q.size() - int'(D);
    for (int i = 0; i < int'(D); i++) acc = acc + (S+4)'(q[b+i]) * (S+4)'(c[i]);
    return acc;
  endfunction

  logic [S-1:0] r1 [$], r4 [$];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // impulse-response seed
    for (int i = 0; i < int'(D); i++) begin
      @(negedge clk); en = 1'b1; load = 1'b1; din = (i == int'(D) - 1) ? S'(1) : '0;
      r1.push_back(din); r4.push_back(din);
    end
    @(negedge clk); en = 1'b0; load = 1'b0;
    for (int n = 0; n < NMEM; n++) begin
      logic [S+3:0] x1, x4;
      x1 = step(r1, EX_COEF);
      x4 = step(r4, COEF4);
      if (x1[S+3:S] != 0) wraps++;
      r1.push_back(x1[S-1:0]);
      r4.push_back(x4[S-1:0]);
      check(u_chain,  r1[n], $sformatf("chain member %0d", n));
      check(u_tree,   r1[n], $sformatf("tree member %0d", n));
      check(u4_chain, r4[n], $sformatf("P4 chain member %0d", n));
      check(u4_tree,  r4[n], $sformatf("P4 tree member %0d", n));
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      if (n % 97 == 5) begin
        // stall for two clocks: the outputs must hold
        @(negedge clk); @(negedge clk);
        check(u_chain, r1[n+1], "stall chain");
        check(u_tree,  r1[n+1], "stall tree");
      end
    end
    // uniform distribution of the low 4 bits and return to the seed
    begin
      int cnt [16];
      int bad;
      bad = 0;
      for (int v = 0; v < 16; v++) cnt[v] = 0;
      for (int n = 0; n < 240; n++) cnt[r1[n][3:0]]++;
      for (int v = 0; v < 16; v++) if (cnt[v] != 15) bad++;
      checks++;
      if (bad != 0) begin failures++; $display("FAIL low-4-bit distribution"); end
      checks++;
      for (int i = 0; i < int'(D); i++) if (r1[240+i][3:0] != r1[i][3:0]) bad++;
      if (bad != 0) begin failures++; $display("FAIL period 240 of low 4 bits"); end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap modulo 2^S seen"); end
    // random seed
    begin
      logic [S-1:0] q [$];
      for (int i = 0; i < int'(D); i++) begin
        logic [S-1:0] w;
        for (int k = 0; k < int'(S / 32); k++) w[32*k +: 32] = $urandom;
        q.push_back(w);
        @(negedge clk); en = 1'b1; load = 1'b1; din = w;
      end
      @(negedge clk); en = 1'b0; load = 1'b0;
      for (int n = 0; n < 40; n++) begin
        logic [S+3:0] x;
        x = step(q, EX_COEF);
        q.push_back(x[S-1:0]);
        check(u_chain, q[n], $sformatf("random seed chain %0d", n));
        check(u_tree,  q[n], $sformatf("random seed tree %0d", n));
        en = 1'b1;
        @(negedge clk);
        en = 1'b0;
      end
    end
    $display("wraps modulo 2^S seen: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
