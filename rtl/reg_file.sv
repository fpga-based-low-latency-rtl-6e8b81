// General purpose register file (REG_FILE_0): NUM_REGS registers of 32 bits with one
// write port and one read port per transport bus, so each bus can read and write a
// register in every instruction. Reads are combinational; a write is visible to the next
// instruction. If two buses write the same register in one cycle, the higher-numbered
// bus wins (a program should not do this). Register 0 is an ordinary register.
// The document names the unit only; its size and port count are this design's.
module reg_file
  import tta_pkg::*;
#(
  parameter int unsigned NUM_REGS = 16,
  parameter int unsigned NB       = NUM_BUSES
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic [NB-1:0]                          we,
  input  logic [NB-1:0][$clog2(NUM_REGS)-1:0]    waddr,
  input  logic [NB-1:0][DATA_W-1:0]              wdata,
  input  logic [NB-1:0][$clog2(NUM_REGS)-1:0]    raddr,
  output logic [NB-1:0][DATA_W-1:0]              rdata
);
  logic [DATA_W-1:0] regs [NUM_REGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
    end else begin
      for (int b = 0; b < NB; b++)
        if (we[b]) regs[waddr[b]] <= wdata[b];
    end
  end

  always_comb
    for (int b = 0; b < NB; b++) rdata[b] = regs[raddr[b]];
endmodule
