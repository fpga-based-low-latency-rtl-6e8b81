// Self-checking test of the LED driver FU: LEDs off after reset, WRITE sets them on the
// next clock edge, READ returns the pattern, other opcodes change nothing.
module tb_fu_led_driver;
  import tta_pkg::*;
  logic clk = 0, rst_n = 0;
  fu_req_t req = '0;
  logic [31:0] result;
  logic [3:0] led;
  int checks = 0, failures = 0;

  fu_led_driver #(.NUM_LEDS(4)) dut (.clk, .rst_n, .req, .result, .led);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    logic [3:0] pat;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check("off after reset", 32'(led), 0);
    pat = 0;
    for (int n = 0; n < 64; n++) begin
      logic [31:0] v;
      v = $urandom;
      @(negedge clk); req = '0; req.t_load = 1; req.t = v; req.opc = (n % 4 == 3) ? 4'd7 : IO_WRITE;
      @(negedge clk); req = '0;
      if (n % 4 != 3) pat = v[3:0];
      check("led pattern", 32'(led), 32'(pat));
      @(negedge clk); req.t_load = 1; req.opc = IO_READ;
      @(negedge clk); req = '0;
      check("read back", result, 32'(pat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
