// Self-checking test of the boolean register file: random writes of bit 0 from the four
// buses to the two registers, compared with a reference in which the higher bus wins.
module tb_bool_rf;
  logic clk = 0, rst_n = 0;
  logic [3:0] we = '0, wdata = '0;
  logic [3:0][0:0] waddr = '0;
  logic [1:0] bools, ref_b;
  int checks = 0, failures = 0;

  bool_rf #(.NUM_BOOLS(2), .NB(4)) dut (.clk, .rst_n, .we, .waddr, .wdata, .bools);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (bools !== 2'b00) begin failures++; $display("FAIL reset value"); end
    rst_n = 1;
    ref_b = '0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      we = 4'($urandom); wdata = 4'($urandom);
      for (int b = 0; b < 4; b++) waddr[b] = 1'($urandom);
      @(posedge clk);
      for (int b = 0; b < 4; b++) if (we[b]) ref_b[waddr[b]] = wdata[b];
      #1;
      checks++;
      if (bools !== ref_b) begin failures++; $display("FAIL got %b expected %b", bools, ref_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
