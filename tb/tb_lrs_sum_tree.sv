// tb_lrs_sum_tree: the adder tree against a plain running sum, for 6 terms of
// 1024 bits (the generator's default), for an odd count of 5 narrow terms, and
// for a single term.  Terms are random, with all-ones words mixed in so that
// the sum wraps modulo 2^W.
module tb_lrs_sum_tree;
  int checks = 0, failures = 0;

  logic [5:0][1023:0] t6;
  logic [1023:0]      s6;
  logic [4:0][7:0]    t5;
  logic [7:0]         s5;
  logic [0:0][15:0]   t1;
  logic [15:0]        s1;

  lrs_sum_tree                     dut6 (.terms_i(t6), .sum_o(s6));
  lrs_sum_tree #(.N(5), .W(8))     dut5 (.terms_i(t5), .sum_o(s5));
  lrs_sum_tree #(.N(1), .W(16))    dut1 (.terms_i(t1), .sum_o(s1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 200; k++) begin
      logic [1023:0] e6;
      logic [7:0]    e5;
      for (int i = 0; i < 6; i++) begin
        for (int w = 0; w < 32; w++) t6[i][32*w +: 32] = $urandom;
        if ($urandom_range(3) == 0) t6[i] = '1;
      end
      for (int i = 0; i < 5; i++) t5[i] = 8'($urandom);
      t1[0] = 16'($urandom);
      #1;
      e6 = '0;
      for (int i = 0; i < 6; i++) e6 = e6 + t6[i];
      e5 = '0;
      for (int i = 0; i < 5; i++) e5 = e5 + t5[i];
      checks += 3;
      if (s6 !== e6) begin failures++; $display("FAIL N=6 case %0d", k); end
      if (s5 !== e5) begin failures++; $display("FAIL N=5 case %0d: %h vs %h", k, s5, e5); end
      if (s1 !== t1[0]) begin failures++; $display("FAIL N=1 case %0d", k); end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
