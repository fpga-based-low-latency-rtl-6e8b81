// Self-checking test of the general register file: random writes on all four bus ports
// at once (distinct registers), reads on all four read ports, compared with a reference
// array; a write is seen by a read in the next cycle and not in the same one.
module tb_reg_file;
  logic clk = 0, rst_n = 0;
  logic [3:0] we = '0;
  logic [3:0][3:0] waddr = '0, raddr = '0;
  logic [3:0][31:0] wdata = '0, rdata;
  logic [31:0] ref_r [16];
  int checks = 0, failures = 0;

  reg_file #(.NUM_REGS(16), .NB(4)) dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) ref_r[i] = 0;
    for (int n = 0; n < 1000; n++) begin
      logic [15:0] used;
      used = '0;
      @(negedge clk);
      for (int b = 0; b < 4; b++) begin
        raddr[b] = 4'($urandom);
        waddr[b] = 4'($urandom);
        we[b] = !used[waddr[b]] && ($urandom % 2 == 1);
        if (we[b]) used[waddr[b]] = 1'b1;
        wdata[b] = $urandom;
      end
      #1;
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (rdata[b] !== ref_r[raddr[b]]) begin
          failures++;
          $display("FAIL port %0d reg %0d: got %h expected %h", b, raddr[b], rdata[b], ref_r[raddr[b]]);
        end
      end
      @(posedge clk);
      for (int b = 0; b < 4; b++) if (we[b]) ref_r[waddr[b]] = wdata[b];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
