// I2S receiver functional unit (I2S_LJ_master_RX), the mirror of the transmitter: it
// samples the converter's data line on the bclk_rise strobe, collects the 24 MSBs of the
// left slot (lrclk high) and of the right slot, and pushes the stereo frame into an
// internal FIFO when the last sample bit of the right slot arrives. The data line is
// synchronised to the system clock first. RECV pops a frame and returns the left sample
// sign-extended to 32 bits (0 and no pop when empty); RIGHT then returns the right
// sample of that frame. STATUS returns {8'0, flags, free, used}; flags bit 0 = a frame
// was dropped because the FIFO was full. Format and widths follow the document; the
// FIFO depth and the operations are this design's choices.
module fu_i2s_lj_rx
  import tta_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned SLOT_W     = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  fu_req_t           req,
  output logic [DATA_W-1:0] result,
  input  logic              bclk_rise,
  input  logic [5:0]        bit_idx,
  input  logic              sdin
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  logic                  sdin_s, push, pop, full, empty, overrun;
  logic [SAMPLE_W-1:0]   shreg, left_q, right_q, shnext;
  logic [2*SAMPLE_W-1:0] head;
  logic [CW-1:0]         count;
  logic [4:0]            pos;

  bit_sync u_sync (.clk, .rst_n, .d(sdin), .q(sdin_s));

  assign pos    = bit_idx[4:0];
  assign shnext = {shreg[SAMPLE_W-2:0], sdin_s};
  assign push   = bclk_rise && bit_idx[5] && pos == 5'(SAMPLE_W - 1);
  assign pop    = req.t_load && req.opc == PER_RECV && !empty;

  sync_fifo #(.WIDTH(2*SAMPLE_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push, .wdata({left_q, shnext}), .pop, .rdata(head),
    .count, .full, .empty);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shreg   <= '0;
      left_q  <= '0;
      right_q <= '0;
      overrun <= 1'b0;
      result  <= '0;
    end else begin
      if (bclk_rise && pos < 5'(SAMPLE_W)) begin
        shreg <= shnext;
        if (!bit_idx[5] && pos == 5'(SAMPLE_W - 1)) left_q <= shnext;
      end
      if (push && full) overrun <= 1'b1;
      if (req.t_load) begin
        unique case (req.opc)
          PER_STATUS: begin
            result  <= {8'd0, 7'd0, overrun, 8'(FIFO_DEPTH - count), 8'(count)};
            overrun <= 1'b0;
          end
          PER_RECV: begin
            result  <= empty ? '0 : DATA_W'($signed(head[2*SAMPLE_W-1:SAMPLE_W]));
            right_q <= empty ? '0 : head[SAMPLE_W-1:0];
          end
          PER_RIGHT: result <= DATA_W'($signed(right_q));
          default: ;
        endcase
      end
    end
  end

  initial assert (SLOT_W == 32) else $error("bit_idx layout assumes 32-bit slots");
endmodule
