// Self-checking test of the ALU FU: random operands for every operation, compared with a
// reference computed here; also checks that the result appears exactly one cycle after
// the trigger and holds while no trigger arrives, and that an operand-1 move in the same
// cycle as the trigger is used.
module tb_fu_alu;
  import tta_pkg::*;
  logic clk = 0, rst_n = 0;
  fu_req_t req = '0;
  logic [31:0] result;
  int checks = 0, failures = 0;

  fu_alu dut (.clk, .rst_n, .req, .result);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] model(logic [3:0] op, logic [31:0] a, logic [31:0] b);
    case (op)
      0: return a + b;
      1: return a - b;
      2: return a & b;
      3: return a | b;
      4: return a ^ b;
      5: return a << (b % 32);
      6: return $unsigned($signed(a) >>> (b % 32));
      7: return a >> (b % 32);
      8: return {31'd0, a == b};
      9: return {31'd0, $signed(a) > $signed(b)};
      10: return {31'd0, a > b};
      11: return a * b;
      default: return 0;
    endcase
  endfunction

  initial begin
    logic [31:0] a, b;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      logic [3:0] op;
      op = 4'(n % 12);
      a = $urandom;
      b = (n % 5 == 0) ? a : $urandom;
      if (n % 7 == 0) b = b % 40;
      @(negedge clk);
      req = '0;
      req.o1_load = 1; req.o1 = a; req.t_load = 1; req.t = b; req.opc = op;
      @(posedge clk); #1;
      check($sformatf("op %0d a=%h b=%h", op, a, b), result, model(op, a, b));
      req = '0;
      @(negedge clk);
      check("result holds", result, model(op, a, b));
    end
    // operand 1 kept from an earlier move
    @(negedge clk); req = '0; req.o1_load = 1; req.o1 = 32'd1000;
    @(negedge clk); req = '0; req.t_load = 1; req.t = 32'd234; req.opc = ALU_SUB;
    @(negedge clk); req = '0;
    check("stored operand 1", result, 32'd766);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
