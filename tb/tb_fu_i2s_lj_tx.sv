// Self-checking test of the left-justified I2S transmitter with the clock generator:
// frames pushed through SEND are decoded here from bclk/lrclk/sdout the way a
// left-justified DAC would (MSB on the first bit clock after the lrclk edge, sampled on
// the rising bclk edge, 24 data bits and 8 zero bits per 32-bit slot) and compared; the
// FIFO level reported by STATUS and the underrun flag (silence once the FIFO is empty)
// are checked too.
module tb_fu_i2s_lj_tx;
  import tta_pkg::*;
  logic clk = 0, rst_n = 0, mclk = 0;
  logic bclk, lrclk, bclk_rise, bclk_fall, sdout;
  logic [5:0] bit_idx;
  fu_req_t req = '0;
  logic [31:0] result;
  int checks = 0, failures = 0;

  i2s_clock_gen u_gen (.clk, .rst_n, .mclk, .bclk, .lrclk, .bclk_rise, .bclk_fall, .bit_idx);
  fu_i2s_lj_tx #(.FIFO_DEPTH(4)) dut (.clk, .rst_n, .req, .result, .bclk_fall, .bit_idx, .sdout);
  always #5 clk = ~clk;
  always #45 mclk = ~mclk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // DAC model
  logic [47:0] frames [$];
  logic [23:0] left_s, cur;
  logic prev_lr = 0;
  int bitn = 0;
  always @(posedge bclk) begin
    if (lrclk != prev_lr) begin
      if (!lrclk) left_s = cur;               // left slot finished
      else if (bitn >= 32) frames.push_back({left_s, cur});
      bitn = 0;
      cur = '0;
    end
    if (bitn < 24) cur = {cur[22:0], sdout};
    else begin
      checks++;
      if (sdout !== 1'b0) begin failures++; $display("FAIL padding bit not 0"); end
    end
    bitn++;
    prev_lr = lrclk;
  end

  task automatic op(logic [3:0] opc, logic [31:0] o1, logic [31:0] t);
    @(negedge clk); req = '0; req.o1_load = 1; req.o1 = o1; req.t_load = 1; req.t = t; req.opc = opc;
    @(negedge clk); req = '0;
  endtask

  initial begin
    logic [47:0] sent [4];
    int first;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      sent[i] = {24'($urandom) | 24'h800001, 24'($urandom) | 24'h000100};
      op(PER_SEND, 32'(sent[i][47:24]), 32'(sent[i][23:0]));
    end
    op(PER_STATUS, 0, 0);
    check("fifo level", result[7:0], 4);
    check("fifo free", result[15:8], 0);
    while (frames.size() < 10) @(posedge clk);
    first = -1;
    foreach (frames[i]) if (first < 0 && frames[i] != 0) first = i;
    check("first frames sent", first >= 0, 1);
    for (int i = 0; i < 4; i++) check($sformatf("frame %0d", i), frames[first + i], sent[i]);
    check("silence after the FIFO empties", frames[first + 4], 0);
    op(PER_STATUS, 0, 0);
    check("underrun flag", result[16], 1);
    check("fifo empty", result[7:0], 0);
    op(PER_STATUS, 0, 0);
    // the flag clears on read, but frames keep underrunning: allow both
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
