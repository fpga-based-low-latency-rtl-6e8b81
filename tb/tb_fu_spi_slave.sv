// Self-checking test of the SPI slave: a mode-0 master model (8-bit frames, MSB first,
// SCLK at a tenth of the system clock) exchanges bytes in one chip-select burst; the
// test checks the bytes the slave received (RECV), the bytes it returned on MISO from its
// transmit FIFO (0 once that FIFO is empty), and the overrun flag.
module tb_fu_spi_slave;
  import tta_pkg::*;
  localparam int HALF = 5;    // system clock cycles per half SCLK period
  logic clk = 0, rst_n = 0, sclk = 0, cs_n = 1, mosi = 0, miso;
  fu_req_t req = '0;
  logic [31:0] result;
  int checks = 0, failures = 0;

  fu_spi_slave #(.FIFO_DEPTH(16)) dut (.clk, .rst_n, .req, .result, .sclk, .cs_n, .mosi, .miso);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic op(logic [3:0] opc, logic [31:0] t = 0);
    @(negedge clk); req = '0; req.t_load = 1; req.t = t; req.opc = opc;
    @(negedge clk); req = '0;
  endtask

  task automatic xfer(input logic [7:0] out, output logic [7:0] in);
    for (int i = 7; i >= 0; i--) begin
      mosi = out[i];
      repeat (HALF) @(posedge clk);
      sclk = 1; in[i] = miso;
      repeat (HALF) @(posedge clk);
      sclk = 0;
    end
  endtask

  initial begin
    logic [7:0] m2s [20], s2m [6], got;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 6; i++) begin
      s2m[i] = 8'($urandom);
      op(PER_SEND, 32'(s2m[i]));
    end
    for (int i = 0; i < 20; i++) m2s[i] = 8'($urandom);
    // burst of 8 bytes
    cs_n = 0;
    repeat (2 * HALF) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      xfer(m2s[i], got);
      check($sformatf("miso byte %0d", i), 32'(got), (i < 6) ? 32'(s2m[i]) : 0);
    end
    repeat (2 * HALF) @(posedge clk);
    cs_n = 1;
    repeat (10) @(posedge clk);
    op(PER_STATUS);
    check("rx level", result[7:0], 8);
    check("tx empty flag", result[17], 1);
    for (int i = 0; i < 8; i++) begin
      op(PER_RECV);
      check($sformatf("mosi byte %0d", i), result[8:0], {1'b1, m2s[i]});
    end
    op(PER_RECV);
    check("empty read not valid", result[8], 0);
    // 20 more bytes without reading: 16 kept, overrun flagged
    cs_n = 0;
    repeat (2 * HALF) @(posedge clk);
    for (int i = 0; i < 20; i++) xfer(m2s[i], got);
    cs_n = 1;
    repeat (10) @(posedge clk);
    op(PER_STATUS);
    check("rx full", result[7:0], 16);
    check("overrun flag", result[16], 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
