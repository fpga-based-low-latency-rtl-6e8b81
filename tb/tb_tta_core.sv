// Self-checking test of the TTA core with instruction and data memories: runs a small
// hand-assembled program that exercises parallel moves, the ALU, register and boolean
// register files, a guarded branch loop (sum of 1..10), the branch delay slot, call and
// return through the GCU result, loads and stores, the LED, switch and timer FUs, and
// an instruction that uses all four buses at once. The
// results stored in data memory are compared with values worked out by hand, including
// the cycle count measured by the timer (which fixes the pipeline timing).
module tb_tta_core;
  import tta_pkg::*;
  import tta_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [9:0] imem_addr, prog_addr = '0;
  logic [127:0] imem_rdata, prog_data = '0;
  logic prog_we = 0;
  logic dmem_en, dmem_we;
  logic [11:0] dmem_addr;
  logic [31:0] dmem_wdata, dmem_rdata;
  logic [1:0] i2s_sdout, midi_out, spi_miso;
  logic [3:0] led;
  logic [3:0] sw = 4'hA;
  int checks = 0, failures = 0;

  tta_core dut (
    .clk, .rst_n, .imem_addr, .imem_rdata, .dmem_en, .dmem_we, .dmem_addr, .dmem_wdata,
    .dmem_rdata, .bclk_rise(1'b0), .bclk_fall(1'b0), .bit_idx(6'd0), .i2s_sdout,
    .i2s_sdin(2'b00), .midi_out, .midi_in(4'hF), .spi_sclk(2'b00), .spi_cs_n(2'b11),
    .spi_mosi(2'b00), .spi_miso, .led, .sw);
  inst_mem u_imem (.clk, .raddr(imem_addr), .rdata(imem_rdata), .we(prog_we),
                   .waddr(prog_addr), .wdata(prog_data));
  data_mem u_dmem (.clk, .en(dmem_en), .we(dmem_we), .addr(dmem_addr), .wdata(dmem_wdata),
                   .rdata(dmem_rdata));
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

  logic [127:0] prog [64];
  task automatic load(int a, logic [127:0] w);
    prog[a] = w;
  endtask

  // Records every store the core makes (address -> data).
  logic [31:0] stored [int];
  logic [3:0] led_hist [$];
  always @(posedge clk) if (rst_n && (led_hist.size() == 0 || led_hist[$] != led)) led_hist.push_back(led);
  always @(posedge clk) if (rst_n && dmem_en && dmem_we) stored[int'(dmem_addr)] = dmem_wdata;

  initial begin
    for (int a = 0; a < 64; a++) prog[a] = I(NOP);
    // 0: four moves at once: sum = 0, n = 10, r9 = -5, clear the timer
    load(0, I(MI(0, R(0)), MI(10, R(1)), MI(-5, R(9)), MI(0, D(FU_TIMER, P_TRIG, TMR_CLEAR))));
    // loop: sum += n; n -= 1; b0 = n > 0; if b0 jump loop (delay slot writes LEDs)
    load(1, I(MS(FU_RF, 0, D(FU_ALU, P_OP1)), MS(FU_RF, 1, D(FU_ALU, P_TRIG, ALU_ADD))));
    load(2, I(MS(FU_ALU, 0, R(0)), MS(FU_RF, 1, D(FU_ALU, P_OP1)), MI(1, D(FU_ALU, P_TRIG, ALU_SUB))));
    load(3, I(MS(FU_ALU, 0, R(1)), MS(FU_ALU, 0, D(FU_ALU, P_OP1)), MI(0, D(FU_ALU, P_TRIG, ALU_GT))));
    load(4, I(MS(FU_ALU, 0, B(0))));
    load(5, I(MI(1, D(FU_GCU, P_TRIG, GCU_JUMP), G_B0)));
    load(6, I(MS(FU_RF, 1, D(FU_LED, P_TRIG, IO_WRITE))));
    // store sum to [100], load it back, show it on the LEDs
    load(7, I(MS(FU_RF, 0, D(FU_LSU, P_OP1)), MI(100, D(FU_LSU, P_TRIG, LSU_ST))));
    load(8, I(MI(100, D(FU_LSU, P_TRIG, LSU_LD))));
    load(9, I(MS(FU_LSU, 0, R(3))));
    load(10, I(MS(FU_RF, 3, D(FU_LED, P_TRIG, IO_WRITE))));
    // call 40 (delay slot sets r5), return lands at 13
    load(11, I(MI(40, D(FU_GCU, P_TRIG, GCU_CALL))));
    load(12, I(MI(16'h5A, R(5))));
    load(13, I(MI(16'hAB, R(6))));
    load(14, I(MS(FU_RF, 5, D(FU_LSU, P_OP1)), MI(102, D(FU_LSU, P_TRIG, LSU_ST))));
    load(15, I(MS(FU_RF, 6, D(FU_LSU, P_OP1)), MI(103, D(FU_LSU, P_TRIG, LSU_ST))));
    load(16, I(MS(FU_RF, 7, D(FU_LSU, P_OP1)), MI(104, D(FU_LSU, P_TRIG, LSU_ST))));
    load(17, I(MI(0, D(FU_SW, P_TRIG, IO_READ))));
    load(18, I(MS(FU_SW, 0, D(FU_LSU, P_OP1)), MI(105, D(FU_LSU, P_TRIG, LSU_ST))));
    // b0 is 0 now: this guarded jump is not taken, the unguarded move is
    load(19, I(MI(50, D(FU_GCU, P_TRIG, GCU_JUMP), G_B0), MI(1, R(8)), MI(0, B(1)), NOP));
    load(20, I(MS(FU_RF, 8, D(FU_LSU, P_OP1)), MI(106, D(FU_LSU, P_TRIG, LSU_ST)),
               MI(7, R(10), G_NB1)));
    load(21, I(MS(FU_RF, 9, D(FU_LSU, P_OP1)), MI(107, D(FU_LSU, P_TRIG, LSU_ST))));
    load(22, I(MI(0, D(FU_TIMER, P_TRIG, TMR_READ))));
    load(23, I(MS(FU_TIMER, 0, D(FU_LSU, P_OP1)), MI(108, D(FU_LSU, P_TRIG, LSU_ST))));
    load(24, I(MS(FU_RF, 10, D(FU_LSU, P_OP1)), MI(109, D(FU_LSU, P_TRIG, LSU_ST))));
    // all four buses at once: LED write and read back, MUL of a negative value, guard on b1 true
    load(25, I(MI(5, B(1)), MI(3, D(FU_LED, P_TRIG, IO_WRITE)), MI(777, R(12)), MI(-1234, R(11))));
    load(26, I(MI(0, D(FU_LED, P_TRIG, IO_READ)), NOP, MS(FU_RF, 12, D(FU_ALU, P_TRIG, ALU_MUL)),
               MS(FU_RF, 11, D(FU_ALU, P_OP1))));
    load(27, I(MI(1, R(14), G_B1), MS(FU_ALU, 0, R(13)), MI(110, D(FU_LSU, P_TRIG, LSU_ST)),
               MS(FU_LED, 0, D(FU_LSU, P_OP1))));
    load(28, I(MS(FU_RF, 13, D(FU_LSU, P_OP1)), NOP, NOP, MI(111, D(FU_LSU, P_TRIG, LSU_ST))));
    load(29, I(NOP, MI(112, D(FU_LSU, P_TRIG, LSU_ST)), MS(FU_RF, 14, D(FU_LSU, P_OP1))));
    load(30, I(MI(30, D(FU_GCU, P_TRIG, GCU_JUMP))));
    // subroutine: return through the saved address, delay slot sets r7
    load(40, I(MS(FU_GCU, 0, D(FU_GCU, P_TRIG, GCU_JUMP))));
    load(41, I(MI(1, R(7))));
    load(50, I(MI(999, R(8))));   // must not be reached
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); prog_we = 1; prog_addr = 10'(a); prog_data = prog[a];
    end
    @(negedge clk); prog_we = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (200) @(negedge clk);
    check("sum stored", stored[100], 55);
    check("leds showed sum", 32'(led_hist[led_hist.size() - 2]), 32'(55 & 15));
    check("leds now", 32'(led), 3);
    check("led read back (buses 1, 3, 2)", stored[110], 3);
    check("mul of negative value (buses 3, 2, 1, 0)", stored[111], 32'(-1234 * 777));
    check("guard on b1 true (bus 0)", stored[112], 1);
    check("call delay slot", stored[102], 32'h5A);
    check("return address", stored[103], 32'hAB);
    check("return delay slot", stored[104], 1);
    check("switches", stored[105], 32'hA);
    check("guarded jump not taken", stored[106], 1);
    check("negative immediate", stored[107], 32'hFFFF_FFFB);
    check("timer: cycles from instr 0 to instr 22", stored[108], 77);
    check("guard on b1 false", stored[109], 7);
    check("stuck at halt loop", 32'(imem_addr), 32'd30 + (imem_addr == 10'd31 ? 1 : 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
