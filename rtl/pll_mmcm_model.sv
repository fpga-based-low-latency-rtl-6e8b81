// Behavioural model (not synthesizable) of the FPGA clock manager (MMCM/PLL) that makes
// the 11 MHz audio master clock from the board clock. On a real device this is a
// vendor primitive configured for the target frequency. The model waits LOCK_CYCLES
// input clock cycles after reset is released, then raises locked and starts a free
// running output with period OUT_PERIOD_PS (90909 ps, about 11 MHz). The output has no
// phase relation to clk_in, which is how the rest of the design treats it. The 11 MHz
// figure follows the document; the lock behaviour is this model's own.
`timescale 1ns / 1ps
module pll_mmcm_model #(
  parameter int unsigned OUT_PERIOD_PS = 90_909,
  parameter int unsigned LOCK_CYCLES   = 16
) (
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_out,
  output logic locked
);
  int unsigned cnt;

  initial begin
    clk_out = 1'b0;
    locked  = 1'b0;
    cnt     = 0;
  end

  always @(posedge clk_in) begin
    if (!rst_n) begin
      cnt    <= 0;
      locked <= 1'b0;
    end else if (cnt < LOCK_CYCLES) begin
      cnt <= cnt + 1;
    end else begin
      locked <= 1'b1;
    end
  end

  always begin
    #(real'(OUT_PERIOD_PS) / 2000.0);
    clk_out = locked ? !clk_out : 1'b0;
  end
endmodule
