// Self-checking test of the global control unit: sequential fetch after reset, a jump
// and a call taking effect on the cycle after the trigger (one delay slot), and the
// return address saved by a call.
module tb_fu_gcu;
  import tta_pkg::*;
  logic clk = 0, rst_n = 0;
  fu_req_t req = '0;
  logic [9:0] pc;
  logic exec_valid;
  logic [31:0] result;
  int checks = 0, failures = 0;

  fu_gcu #(.PC_W(10)) dut (.clk, .rst_n, .req, .pc, .exec_valid, .result);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    check("pc in reset", 32'(pc), 0);
    check("no exec in reset", 32'(exec_valid), 0);
    rst_n = 1;
    for (int i = 1; i <= 5; i++) begin
      @(negedge clk);
      check("sequential pc", 32'(pc), i);
      check("exec valid", 32'(exec_valid), 1);
    end
    // jump to 300 (pc now 5)
    req.t_load = 1; req.t = 300; req.opc = GCU_JUMP;
    @(negedge clk); req = '0;
    check("jump target", 32'(pc), 300);
    @(negedge clk);
    check("after jump", 32'(pc), 301);
    // call 40 at pc 301: return address 302 + 1 (after the delay slot)
    req.t_load = 1; req.t = 40; req.opc = GCU_CALL;
    @(negedge clk); req = '0;
    check("call target", 32'(pc), 40);
    check("return address", result, 302);
    // a trigger with another opcode does not jump
    req.t_load = 1; req.t = 7; req.opc = 4'd5;
    @(negedge clk); req = '0;
    check("other opcode ignored", 32'(pc), 41);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
