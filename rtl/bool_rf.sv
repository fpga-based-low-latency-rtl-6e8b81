// Boolean register file ("bool"): NUM_BOOLS one-bit registers that guard moves. Any bus
// may write a register (bit 0 of the moved value); all registers are always visible to
// the guard logic and as move sources. A write is visible to the next instruction; the
// higher-numbered bus wins if two buses write the same register. The document names the
// unit only; its size is this design's choice.
module bool_rf
  import tta_pkg::*;
#(
  parameter int unsigned NUM_BOOLS = 2,
  parameter int unsigned NB        = NUM_BUSES
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic [NB-1:0]                         we,
  input  logic [NB-1:0][$clog2(NUM_BOOLS)-1:0]  waddr,
  input  logic [NB-1:0]                         wdata,
  output logic [NUM_BOOLS-1:0]                  bools
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bools <= '0;
    end else begin
      for (int b = 0; b < NB; b++)
        if (we[b]) bools[waddr[b]] <= wdata[b];
    end
  end
endmodule
