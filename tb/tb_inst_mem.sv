// Self-checking test of the instruction memory: loads random 128-bit words through the
// write port, then checks that each read address returns its word one cycle later.
module tb_inst_mem;
  logic clk = 0, we = 0;
  logic [9:0] raddr = '0, waddr = '0;
  logic [127:0] wdata = '0, rdata;
  logic [127:0] ref_mem [1024];
  int checks = 0, failures = 0;

  inst_mem #(.DEPTH(1024), .INSTR_W(128)) dut (.clk, .raddr, .rdata, .we, .waddr, .wdata);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 1024; a++) begin
      ref_mem[a] = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk); we = 1; waddr = 10'(a); wdata = ref_mem[a];
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      int a;
      a = (n < 1024) ? n : $urandom % 1024;
      @(negedge clk); raddr = 10'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++;
        $display("FAIL read %0d: got %h expected %h", a, rdata, ref_mem[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
