// Switch driver functional unit: the board switches pass through two-flop
// synchronisers; READ copies their state to the result register. The document names the
// unit only; the operation is this design's choice.
module fu_switch_driver
  import tta_pkg::*;
#(
  parameter int unsigned NUM_SW = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  fu_req_t           req,
  output logic [DATA_W-1:0] result,
  input  logic [NUM_SW-1:0] sw
);
  logic [NUM_SW-1:0] sw_s;

  for (genvar i = 0; i < NUM_SW; i++) begin : g_sync
    bit_sync u_sync (.clk, .rst_n, .d(sw[i]), .q(sw_s[i]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) result <= '0;
    else if (req.t_load && req.opc == IO_READ) result <= DATA_W'(sw_s);
  end
endmodule
