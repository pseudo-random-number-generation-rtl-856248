// tb_lfsr_external: checks the 6-register external LFSR against the published
// impulse response of x^6 + x^4 + x^3 + x^2 + x + 1 over GF(2).
// The seed 0,0,0,0,0,1 is shifted in; the output must then repeat the 36
// listed bits 000001 011011 100111 110100 100011 000001, repeat with period 30,
// and hold 15 ones in every 30 consecutive bits.  A second run from random seeds
// compares with the recurrence evaluated here, and a stall (en low) must hold
// the output.
module tb_lfsr_external;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, load = 1'b0, din = 1'b0, bit_o;
  int   checks = 0, failures = 0;

  localparam logic [35:0] IR = 36'b000001_011011_100111_110100_100011_000001;

  lfsr_external dut (.clk, .rst_n, .en_i(en), .load_i(load), .din_i(din), .bit_o);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic shift_in(input logic b);
    @(negedge clk); en = 1'b1; load = 1'b1; din = b;
    @(negedge clk); en = 1'b0; load = 1'b0;
  endtask

  logic seq [$];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // IR seed, first bit first
    for (int i = 0; i < 6; i++) shift_in(IR[35-i]);
    @(negedge clk);
    for (int n = 0; n < 120; n++) begin
      seq.push_back(bit_o);
      if (n < 36) check(bit_o, IR[35-n], $sformatf("IR bit %0d", n));
      if (n >= 30) check(bit_o, seq[n-30], $sformatf("period 30 at %0d", n));
      en = 1'b1;
      @(negedge clk);
    end
    en = 1'b0;
    begin
      int ones;
      ones = 0;
      for (int n = 0; n < 30; n++) ones += int'(seq[n+7]);
      checks++;
      if (ones != 15) begin failures++; $display("FAIL ones=%0d", ones); end
    end
    // stall: output must hold
    begin
      logic held;
      held = bit_o;
      repeat (3) @(negedge clk);
      check(bit_o, held, "stall");
    end
    // random seeds against the recurrence u[n+6] = u[n+4]^u[n+3]^u[n+2]^u[n+1]^u[n]
    for (int t = 0; t < 4; t++) begin
      logic r [$];
      for (int i = 0; i < 6; i++) begin
        r.push_back(1'($urandom));
        shift_in(r[i]);
      end
      @(negedge clk);
      for (int n = 0; n < 50; n++) begin
        if (n + 6 >= r.size()) r.push_back(r[n+4] ^ r[n+3] ^ r[n+2] ^ r[n+1] ^ r[n]);
        check(bit_o, r[n], $sformatf("seed %0d bit %0d", t, n));
        en = 1'b1;
        @(negedge clk);
      end
      en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
