// Self-checking test of the clock manager model: no output before lock, locked exactly
// LOCK_CYCLES + 1 input cycles after reset is released, an output period of 90.909 ns
// (11 MHz) measured over 100 periods with a 50% duty cycle, and on a new reset the lock
// and the output drop and come back.
`timescale 1ns / 1ps
module tb_pll_mmcm_model;
  logic clk = 0, rst_n = 0, clk_out, locked;
  int checks = 0, failures = 0;

  pll_mmcm_model dut (.clk_in(clk), .rst_n, .clk_out, .locked);
  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    realtime t0, t1, th;
    int n;
    repeat (5) @(posedge clk);
    check("no lock and no output in reset", locked === 1'b0 && clk_out === 1'b0);
    for (int round = 0; round < 2; round++) begin
      @(negedge clk) rst_n = 1;
      n = 0;
      while (locked !== 1'b1 && n < 100) begin @(posedge clk); #1; n++; end
      check($sformatf("lock after %0d input cycles", n), n == 17);
      @(posedge clk_out); t0 = $realtime;
      @(negedge clk_out); th = $realtime - t0;
      check($sformatf("high time %f ns", th), th > 45.0 && th < 46.0);
      repeat (100) @(posedge clk_out);
      t1 = $realtime;
      check($sformatf("100 periods took %f ns", t1 - t0), (t1 - t0) >= 9089.0 && (t1 - t0) <= 9093.0);
      $display("output frequency %f MHz", 100000.0 / (t1 - t0));
      rst_n = 0;
      repeat (2) @(posedge clk);
      #100;
      check("lock drops in reset", locked === 1'b0);
      t0 = $realtime;
      n = 0;
      repeat (20) begin @(posedge clk); n += int'(clk_out); end
      check("no output in reset", n == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
