// Self-checking test of the load-store unit together with a data memory: random stores
// followed by loads, store data taken from an operand moved in the same cycle or earlier,
// load data visible exactly one cycle after the trigger and held afterwards.
module tb_fu_lsu;
  import tta_pkg::*;
  logic clk = 0, rst_n = 0;
  fu_req_t req = '0;
  logic [31:0] result, mem_wdata, mem_rdata;
  logic mem_en, mem_we;
  logic [7:0] mem_addr;
  logic [31:0] ref_mem [256];
  int checks = 0, failures = 0;

  fu_lsu #(.ADDR_W(8)) dut (.clk, .rst_n, .req, .result, .mem_en, .mem_we, .mem_addr,
                            .mem_wdata, .mem_rdata);
  data_mem #(.DEPTH(256)) u_mem (.clk, .en(mem_en), .we(mem_we), .addr(mem_addr),
                                 .wdata(mem_wdata), .rdata(mem_rdata));
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
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      ref_mem[a] = $urandom;
      @(negedge clk);
      req = '0;
      if (a % 2 == 0) begin  // operand in the same cycle
        req.o1_load = 1; req.o1 = ref_mem[a];
      end else begin         // operand one cycle earlier
        req.o1_load = 1; req.o1 = ref_mem[a];
        @(negedge clk);
        req = '0;
      end
      req.t_load = 1; req.t = 32'(a); req.opc = LSU_ST;
    end
    @(negedge clk); req = '0;
    for (int n = 0; n < 300; n++) begin
      int a;
      a = $urandom % 256;
      @(negedge clk);
      req = '0; req.t_load = 1; req.t = 32'(a); req.opc = LSU_LD;
      @(posedge clk); #1;
      check($sformatf("load %0d", a), result, ref_mem[a]);
      req = '0;
      repeat (2) @(negedge clk);
      check("load data held", result, ref_mem[a]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
