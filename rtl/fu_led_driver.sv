// LED driver functional unit: WRITE sets the board LEDs from the low bits of the moved
// value, READ returns the current LED pattern. LEDs are registered outputs, off after
// reset. The document names the unit only; the operations are this design's choice.
module fu_led_driver
  import tta_pkg::*;
#(
  parameter int unsigned NUM_LEDS = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  fu_req_t             req,
  output logic [DATA_W-1:0]   result,
  output logic [NUM_LEDS-1:0] led
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      led    <= '0;
      result <= '0;
    end else if (req.t_load) begin
      if (req.opc == IO_WRITE) led <= req.t[NUM_LEDS-1:0];
      if (req.opc == IO_READ)  result <= DATA_W'(led);
    end
  end
endmodule
