// Self-checking test of the data memory: writes every word, reads back in random order,
// checks the one-cycle read latency and that rdata holds while en is low and during
// writes.
module tb_data_mem;
  logic clk = 0, en = 0, we = 0;
  logic [9:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] ref_mem [1024];
  int checks = 0, failures = 0;

  data_mem #(.DEPTH(1024)) dut (.clk, .en, .we, .addr, .wdata, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
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

  initial begin
    for (int a = 0; a < 1024; a++) begin
      ref_mem[a] = $urandom;
      @(negedge clk); en = 1; we = 1; addr = 10'(a); wdata = ref_mem[a];
    end
    for (int n = 0; n < 500; n++) begin
      int a;
      a = $urandom % 1024;
      @(negedge clk); en = 1; we = 0; addr = 10'(a);
      @(negedge clk); en = 0;
      check($sformatf("read %0d", a), rdata, ref_mem[a]);
      @(negedge clk); en = 1; we = 1; addr = 10'((a + 1) % 1024); wdata = ref_mem[(a + 1) % 1024];
      @(negedge clk); en = 0; we = 0;
      check("held during write", rdata, ref_mem[a]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
