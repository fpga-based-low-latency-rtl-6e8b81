// Instruction memory: DEPTH words of INSTR_W bits (one move slot per transport bus),
// read synchronously every cycle at the address the core's control unit presents, so the
// word appears one cycle after its address. A separate write port loads the program
// while the core is held in reset. Maps to block RAM. The document states the memory's
// purpose; its size, read timing and load port are this design's choices.
module inst_mem #(
  parameter int unsigned DEPTH   = 1024,
  parameter int unsigned INSTR_W = 128
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [INSTR_W-1:0]       rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [INSTR_W-1:0]       wdata
);
  logic [INSTR_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
