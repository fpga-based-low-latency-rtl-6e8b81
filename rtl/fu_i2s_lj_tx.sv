// I2S transmitter functional unit (I2S_LJ_master_TX), left-justified format: each frame
// carries a left and a right 24-bit sample, each in a 32-bit slot, MSB first, with the
// MSB on the first bit clock of the slot (no one-bit delay) and the 8 remaining bits 0.
// Bit clock, lrclk and the bit index come from the shared I2S clock generator; the data
// line changes on the bclk_fall strobe so the receiver can sample on the rising edge.
// The core pushes stereo frames (SEND: operand 1 = left, trigger = right) into an
// internal FIFO; a frame is taken from the FIFO at the start of every lrclk period, which
// is where the samples are re-synchronised to the converter's clock. If the FIFO is
// empty then, silence is sent and the underrun flag is set. STATUS returns
// {8'0, flags, free entries, used entries}; flags bit 0 = underrun since last STATUS.
// Format and sample width follow the document; FIFO depth and operations are this
// design's choices.
module fu_i2s_lj_tx
  import tta_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned SLOT_W     = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  fu_req_t           req,
  output logic [DATA_W-1:0] result,
  input  logic              bclk_fall,
  input  logic [5:0]        bit_idx,
  output logic              sdout
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  logic [DATA_W-1:0]     o1_q, left_in;
  logic [2*SAMPLE_W-1:0] head, frame_q, frame_next;
  logic [CW-1:0]         count;
  logic                  full, empty, push, pop, underrun;
  logic                  slot;
  logic [4:0]            pos;

  assign left_in = req.o1_load ? req.o1 : o1_q;
  assign push    = req.t_load && req.opc == PER_SEND;
  assign pop     = bclk_fall && bit_idx == '0 && !empty;

  sync_fifo #(.WIDTH(2*SAMPLE_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push, .wdata({left_in[SAMPLE_W-1:0], req.t[SAMPLE_W-1:0]}),
    .pop, .rdata(head), .count, .full, .empty);

  // At a frame start the new frame comes straight from the FIFO head.
  assign frame_next = (bit_idx == '0) ? (empty ? '0 : head) : frame_q;
  assign slot       = bit_idx[5];
  assign pos        = bit_idx[4:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      o1_q     <= '0;
      frame_q  <= '0;
      sdout    <= 1'b0;
      underrun <= 1'b0;
      result   <= '0;
    end else begin
      if (req.o1_load) o1_q <= req.o1;
      if (bclk_fall) begin
        frame_q <= frame_next;
        if (pos < 5'(SAMPLE_W))
          sdout <= slot ? frame_next[SAMPLE_W-1 - int'(pos)] : frame_next[2*SAMPLE_W-1 - int'(pos)];
        else
          sdout <= 1'b0;
        if (bit_idx == '0 && empty) underrun <= 1'b1;
      end
      if (req.t_load && req.opc == PER_STATUS) begin
        result   <= {8'd0, 7'd0, underrun, 8'(FIFO_DEPTH - count), 8'(count)};
        underrun <= 1'b0;
      end
    end
  end

  initial assert (SLOT_W == 32) else $error("bit_idx layout assumes 32-bit slots");
endmodule
