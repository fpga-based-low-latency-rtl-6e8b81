// Self-checking test of the switch driver FU: READ returns the switch state once it has
// passed the two-flop synchroniser, and not before.
module tb_fu_switch_driver;
  import tta_pkg::*;
  logic clk = 0, rst_n = 0;
  fu_req_t req = '0;
  logic [31:0] result;
  logic [3:0] sw = '0;
  int checks = 0, failures = 0;

  fu_switch_driver #(.NUM_SW(4)) dut (.clk, .rst_n, .req, .result, .sw);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd();
    @(negedge clk); req = '0; req.t_load = 1; req.opc = IO_READ;
    @(negedge clk); req = '0;
  endtask

  initial begin
    logic [3:0] old;
    repeat (2) @(negedge clk);
    rst_n = 1;
    old = 0;
    for (int n = 0; n < 64; n++) begin
      logic [3:0] v;
      v = 4'($urandom);
      if (v == old) v = ~old;
      @(negedge clk); sw = v;
      // trigger at the next negedge: read sampled 2 edges after the change -> still old
      rd();
      checks++;
      if (result !== 32'(old)) begin failures++; $display("FAIL early read %h, expected old %h", result, old); end
      rd();
      checks++;
      if (result !== 32'(v)) begin failures++; $display("FAIL read %h expected %h", result, v); end
      old = v;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
