// Timer functional unit (TIMER_0): a free-running 32-bit cycle counter. READ copies the
// count to the result register; CLEAR restarts the count from zero. Firmware uses it
// to measure or pace its loop. The document names the unit only; its operations are
// this design's choice.
module fu_timer
  import tta_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  fu_req_t           req,
  output logic [DATA_W-1:0] result
);
  logic [DATA_W-1:0] count;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count  <= '0;
      result <= '0;
    end else begin
      count <= (req.t_load && req.opc == TMR_CLEAR) ? '0 : count + 1'b1;
      if (req.t_load && req.opc == TMR_READ) result <= count;
    end
  end
endmodule
