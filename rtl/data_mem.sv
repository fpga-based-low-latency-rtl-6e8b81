// Data memory: DEPTH 32-bit words for data and global variables, reached through the
// load-store unit. One port: when en is high, a write stores wdata (we = 1) or a read
// registers the addressed word on rdata (we = 0); rdata keeps its value until the next
// read. Maps to block RAM. The document states the memory's purpose; its size, width
// and timing are this design's choices.
module data_mem #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata <= mem[addr];
    end
  end
endmodule
