// Self-checking test of the timer FU: READ returns the number of cycles since the last
// CLEAR (or reset), measured here by counting clock edges.
module tb_fu_timer;
  import tta_pkg::*;
  logic clk = 0, rst_n = 0;
  fu_req_t req = '0;
  logic [31:0] result;
  int checks = 0, failures = 0;

  fu_timer dut (.clk, .rst_n, .req, .result);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(logic [3:0] opc);
    @(negedge clk); req = '0; req.t_load = 1; req.opc = opc;
    @(negedge clk); req = '0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      int wait_c;
      wait_c = $urandom % 200;
      op(TMR_CLEAR);          // count is 0 after the edge that saw CLEAR
      repeat (wait_c) @(negedge clk);
      op(TMR_READ);           // READ sampled wait_c + 1 edges after CLEAR
      checks++;
      if (result !== 32'(wait_c + 1)) begin
        failures++;
        $display("FAIL waited %0d, read %0d", wait_c, result);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
