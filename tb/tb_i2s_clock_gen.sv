// Self-checking test of the I2S clock generator, driven by a free-running master clock
// much slower than the system clock: bclk period of 4 mclk periods, 64 bclk periods per
// lrclk period, lrclk high for the first 32 (left slot), strobes on every bclk edge and
// bit_idx stepping 0..63 with bclk_fall.
module tb_i2s_clock_gen;
  logic clk = 0, rst_n = 0, mclk = 0;
  logic bclk, lrclk, bclk_rise, bclk_fall;
  logic [5:0] bit_idx;
  int checks = 0, failures = 0;

  i2s_clock_gen #(.MCLK_PER_BCLK(4), .BCLK_PER_FRAME(64)) dut (
    .clk, .rst_n, .mclk, .bclk, .lrclk, .bclk_rise, .bclk_fall, .bit_idx);
  always #5 clk = ~clk;
  always #45 mclk = ~mclk;           // 90 ns master clock period

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  int  mclk_rises = 0;
  always @(posedge mclk) mclk_rises++;

  initial begin
    int prev_fall_m, falls, lr_high;
    logic prev_bclk;
    logic [5:0] prev_idx;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // wait for a frame start
    do @(posedge clk); while (!(bclk_fall && bit_idx == 0));
    prev_fall_m = mclk_rises;
    prev_idx = 0;
    lr_high = 0;
    falls = 0;
    prev_bclk = bclk;
    while (falls < 64 * 6) begin
      @(posedge clk); #1;
      if (bclk != prev_bclk) begin
        checks++;
        if ((bclk && !bclk_rise) || (!bclk && !bclk_fall)) begin
          failures++; $display("FAIL strobe missing on bclk edge");
        end
      end
      prev_bclk = bclk;
      if (bclk_fall) begin
        falls++;
        check("mclk periods per bclk", mclk_rises - prev_fall_m, 4);
        prev_fall_m = mclk_rises;
        check("bit index steps", bit_idx, 6'(prev_idx + 1));
        check("lrclk high in left slot", lrclk, bit_idx < 32);
        prev_idx = bit_idx;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
