// Self-checking test of the left-justified I2S receiver with the clock generator: a
// model of a left-justified ADC drives random stereo frames on the data line (MSB on the
// first falling bclk edge after the lrclk edge); the test pops them with RECV/RIGHT and
// compares (sign-extended), checks the FIFO level and the overrun flag when the core
// stops reading.
module tb_fu_i2s_lj_rx;
  import tta_pkg::*;
  logic clk = 0, rst_n = 0, mclk = 0;
  logic bclk, lrclk, bclk_rise, bclk_fall, sdin = 0;
  logic [5:0] bit_idx;
  fu_req_t req = '0;
  logic [31:0] result;
  int checks = 0, failures = 0;

  i2s_clock_gen u_gen (.clk, .rst_n, .mclk, .bclk, .lrclk, .bclk_rise, .bclk_fall, .bit_idx);
  fu_i2s_lj_rx #(.FIFO_DEPTH(4)) dut (.clk, .rst_n, .req, .result, .bclk_rise, .bit_idx, .sdin);
  always #5 clk = ~clk;
  always #45 mclk = ~mclk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // ADC model
  logic [47:0] gen [64];
  int fidx = -1, bitn = 0;
  logic prev_lr = 0;
  initial for (int i = 0; i < 64; i++) gen[i] = {24'($urandom), 24'($urandom)};
  always @(negedge bclk) begin
    if (lrclk != prev_lr) begin
      bitn = 0;
      if (lrclk) fidx++;
    end
    prev_lr = lrclk;
    if (fidx >= 0 && bitn < 24)
      sdin = lrclk ? gen[fidx][47 - bitn] : gen[fidx][23 - bitn];
    else
      sdin = 0;
    bitn++;
  end

  task automatic op(logic [3:0] opc);
    @(negedge clk); req = '0; req.t_load = 1; req.opc = opc;
    @(negedge clk); req = '0;
  endtask

  initial begin
    int got;
    repeat (3) @(negedge clk);
    rst_n = 1;
    got = 0;
    // read 12 frames as they arrive
    while (got < 12) begin
      op(PER_STATUS);
      if (result[7:0] != 0) begin
        op(PER_RECV);
        check($sformatf("left %0d", got), result, 32'($signed(gen[got][47:24])));
        op(PER_RIGHT);
        check($sformatf("right %0d", got), result, 32'($signed(gen[got][23:0])));
        got++;
      end
    end
    // stop reading: the FIFO fills and a frame is dropped
    wait (fidx >= 19);
    op(PER_STATUS);
    check("fifo full", result[7:0], 4);
    check("overrun flag", result[16], 1);
    op(PER_RECV);
    check("oldest kept frame", result, 32'($signed(gen[12][47:24])));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
