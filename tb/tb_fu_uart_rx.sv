// Self-checking test of the MIDI UART receiver at its default 100 MHz / 31250 baud:
// the test drives serial frames onto the line with exact bit timing and also with a
// 2% slower sender, then pops the bytes with RECV; it checks the valid bit, a framing
// error (stop bit 0) being discarded and flagged, and the overrun flag.
module tb_fu_uart_rx;
  import tta_pkg::*;
  localparam int DIV = 100_000_000 / 31_250;
  logic clk = 0, rst_n = 0, rx = 1;
  fu_req_t req = '0;
  logic [31:0] result;
  int checks = 0, failures = 0;

  fu_uart_rx dut (.clk, .rst_n, .req, .result, .rx);
  always #5 clk = ~clk;

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic op(logic [3:0] opc);
    @(negedge clk); req = '0; req.t_load = 1; req.opc = opc;
    @(negedge clk); req = '0;
  endtask

  task automatic send(logic [7:0] b, int bit_cycles, logic stop = 1);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx = f[i];
      repeat (bit_cycles) @(posedge clk);
    end
    rx = 1;
    repeat (bit_cycles) @(posedge clk);
  endtask

  initial begin
    logic [7:0] b;
    repeat (3) @(negedge clk);
    rst_n = 1;
    op(PER_RECV);
    check("empty read not valid", result[8], 0);
    for (int i = 0; i < 6; i++) begin
      b = 8'($urandom);
      send(b, (i % 2) ? DIV * 102 / 100 : DIV);
      op(PER_RECV);
      check("valid", result[8], 1);
      check($sformatf("byte %0d", i), 32'(result[7:0]), 32'(b));
    end
    send(8'h55, DIV, 1'b0);
    op(PER_STATUS);
    check("framing error flag", result[17], 1);
    check("bad byte discarded", result[7:0], 0);
    for (int i = 0; i < 5; i++) send(8'(i + 1), DIV);
    op(PER_STATUS);
    check("fifo full", result[7:0], 4);
    check("overrun flag", result[16], 1);
    for (int i = 0; i < 4; i++) begin
      op(PER_RECV);
      check("kept byte", 32'(result[8:0]), 32'(9'h100 | (i + 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
