// Self-checking test of the MIDI UART transmitter at its default 100 MHz / 31250 baud:
// bytes pushed with SEND are decoded here from the line (start bit, 8 data bits LSB
// first, stop bit) by counting system clock cycles; each bit must last exactly
// 3200 cycles. Also checks STATUS (level, busy) and the drop flag when the FIFO
// overflows.
module tb_fu_uart_tx;
  import tta_pkg::*;
  localparam int DIV = 100_000_000 / 31_250;
  logic clk = 0, rst_n = 0, tx;
  fu_req_t req = '0;
  logic [31:0] result;
  int checks = 0, failures = 0;

  fu_uart_tx dut (.clk, .rst_n, .req, .result, .tx);
  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic op(logic [3:0] opc, logic [31:0] t);
    @(negedge clk); req = '0; req.t_load = 1; req.t = t; req.opc = opc;
    @(negedge clk); req = '0;
  endtask

  // line decoder: samples in the middle of each bit, and checks that queued bytes start
  // exactly 10 bit times apart
  logic [7:0] rx_bytes [$];
  longint cyc = 0, last_start = -1;
  always @(posedge clk) cyc++;
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge tx);
      if (last_start >= 0 && rx_bytes.size() < 5) begin
        checks++;
        if (cyc - last_start != 10 * DIV) begin
          failures++; $display("FAIL byte spacing %0d cycles", cyc - last_start);
        end
      end
      last_start = cyc;
      repeat (DIV / 2) @(negedge clk);
      checks++;
      if (tx !== 1'b0) begin failures++; $display("FAIL start bit"); end
      for (int i = 0; i < 8; i++) begin
        repeat (DIV) @(negedge clk);
        b[i] = tx;
      end
      repeat (DIV) @(negedge clk);
      checks++;
      if (tx !== 1'b1) begin failures++; $display("FAIL stop bit"); end
      rx_bytes.push_back(b);
    end
  end

  initial begin
    logic [7:0] sent [$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    check("line idles high", 32'(tx), 1);
    // 6 bytes at once: one goes to the shifter, four fill the FIFO, the last is dropped
    for (int i = 0; i < 6; i++) begin
      logic [7:0] b;
      b = (i == 0) ? 8'h90 : 8'($urandom);
      if (i < 5) sent.push_back(b);
      op(PER_SEND, 32'(b));
    end
    op(PER_STATUS, 0);
    check("fifo level", result[7:0], 4);
    check("drop flag", result[16], 1);
    check("busy", result[17], 1);
    wait (rx_bytes.size() == 5);
    repeat (DIV) @(posedge clk);
    foreach (sent[i]) check($sformatf("byte %0d", i), 32'(rx_bytes[i]), 32'(sent[i]));
    op(PER_STATUS, 0);
    check("idle after sending", result[17:16], 0);
    check("fifo empty", result[7:0], 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
