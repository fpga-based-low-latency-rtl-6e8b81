// Load-store unit: the core's only path to the data memory.
// A trigger with LD sends the word address to the memory; the memory registers the
// word, which is the unit's result from the next instruction on and holds until the next
// load. A trigger with ST writes operand 1 (or the value moved to OP1 in the same
// instruction) to the address. Addresses count 32-bit words. The document names the
// unit only; word addressing and the latency are this design's choices.
module fu_lsu
  import tta_pkg::*;
#(
  parameter int unsigned ADDR_W = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  fu_req_t           req,
  output logic [DATA_W-1:0] result,
  // data memory port
  output logic              mem_en,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata
);
  logic [DATA_W-1:0] o1_q;

  always_ff @(posedge clk) begin
    if (!rst_n) o1_q <= '0;
    else if (req.o1_load) o1_q <= req.o1;
  end

  assign mem_en    = req.t_load && (req.opc == LSU_LD || req.opc == LSU_ST);
  assign mem_we    = req.t_load && (req.opc == LSU_ST);
  assign mem_addr  = req.t[ADDR_W-1:0];
  assign mem_wdata = req.o1_load ? req.o1 : o1_q;
  assign result    = mem_rdata;
endmodule
