// tb_lrs_internal: internal-form LRS generators.  A 1024-bit generator of the
// example recurrence, a 1024-bit one of the variant with coefficients
// 3,3,1,1,1,0, and the 1-bit internal LFSR are seeded with a 1 followed by five
// zeros and must then produce the impulse-response sequences from member u[5]
// on, one member per clock, as evaluated here by the recurrence.  The LFSR
// output is also compared with the published bits of the period-30 sequence.
// A stall must hold the outputs.
module tb_lrs_internal;
  import prng_pkg::*;
  localparam int unsigned S = 1024;
  localparam int unsigned D = 6;
  localparam logic [D-1:0][COEF_W-1:0] COEF4 = '{2'd0, 2'd1, 2'd1, 2'd1, 2'd3, 2'd3};
  localparam logic [35:0] IR = 36'b000001_011011_100111_110100_100011_000001;
  localparam int NMEM = 1800;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, load = 1'b0;
  logic [S-1:0] din = '0;
  logic [S-1:0] u1, u4;
  logic         ub;
  int checks = 0, failures = 0;

  lrs_internal                  dut1 (.clk, .rst_n, .en_i(en), .load_i(load), .din_i(din), .u_o(u1));
  lrs_internal #(.COEF(COEF4))  dut4 (.clk, .rst_n, .en_i(en), .load_i(load), .din_i(din), .u_o(u4));
  lrs_internal #(.S(1))         dutb (.clk, .rst_n, .en_i(en), .load_i(load), .din_i(din[0]), .u_o(ub));

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

  function automatic logic [S-1:0] step(input logic [S-1:0] q [$], input logic [D-1:0][COEF_W-1:0] c);
    logic [S-1:0] acc;
    int b;
    acc = '0;
    b = q.size() - int'(D);
    for (int i = 0; i < int'(D); i++) acc = acc + q[b+i] * S'(c[i]);
    return acc;
  endfunction

  logic [S-1:0] r1 [$], r4 [$];

  initial begin
    for (int i = 0; i < int'(D); i++) begin
      r1.push_back((i == int'(D) - 1) ? S'(1) : '0);
      r4.push_back((i == int'(D) - 1) ? S'(1) : '0);
    end
    for (int n = 0; n < NMEM + 10; n++) begin
      r1.push_back(step(r1, EX_COEF));
      r4.push_back(step(r4, COEF4));
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < int'(D); i++) begin
      @(negedge clk); en = 1'b1; load = 1'b1; din = (i == 0) ? S'(1) : '0;
    end
    @(negedge clk); en = 1'b0; load = 1'b0; din = '0;
    for (int n = 0; n < NMEM; n++) begin
      int m;
      m = n + int'(D) - 1;
      check(u1, r1[m], $sformatf("member %0d", m));
      check(u4, r4[m], $sformatf("P4 member %0d", m));
      check(S'(ub), S'(r1[m][0]), $sformatf("LFSR bit %0d", m));
      if (m < 36) check(S'(ub), S'(IR[35-m]), $sformatf("published bit %0d", m));
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      if (n % 101 == 7) begin
        @(negedge clk); @(negedge clk);
        check(u1, r1[m+1], "stall");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
