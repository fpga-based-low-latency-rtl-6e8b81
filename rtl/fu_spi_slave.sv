// SPI slave functional unit (SPI_SLAVE) linking the coprocessor to the host, which is
// the SPI master. Frames are 8 bits, MSB first, SPI mode 0: the master samples MISO and
// the slave samples MOSI on the rising edge of SCLK, and both change data on the falling
// edge. SCLK, CS_N and MOSI are synchronised to the system clock, so SCLK may run at up
// to about a tenth of the system clock. When CS_N falls, and after every 8 received bits,
// the next byte to send is taken from the transmit FIFO (0 if it is empty). Each received
// byte enters the receive FIFO. Operations: SEND pushes a byte to send, RECV pops a
// received byte (result = {23'0, valid, byte}), STATUS returns {8'0, flags, rx free,
// rx used} with flags bit 0 = receive overrun, bit 1 = transmit FIFO empty, bit 2 = CS_N
// asserted. The 8-bit frame follows the document; the mode, bit order, FIFOs and
// operations are this design's choices.
module fu_spi_slave
  import tta_pkg::*;
#(
  parameter int unsigned FRAME_W    = 8,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  fu_req_t           req,
  output logic [DATA_W-1:0] result,
  input  logic              sclk,
  input  logic              cs_n,
  input  logic              mosi,
  output logic              miso
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  logic               sclk_s, sclk_d, cs_s, cs_d, mosi_s;
  logic               rise, fall, cs_fall, active;
  logic [FRAME_W-1:0] rx_sh, tx_sh, rx_head, tx_head, rx_next;
  logic [$clog2(FRAME_W):0] nbits;
  logic               rx_push, rx_pop, rx_full, rx_empty, tx_push, tx_pop, tx_full, tx_empty;
  logic [CW-1:0]      rx_count, tx_count;
  logic               overrun, byte_done;

  bit_sync u_s0 (.clk, .rst_n, .d(sclk), .q(sclk_s));
  bit_sync #(.RESET_VAL(1'b1)) u_s1 (.clk, .rst_n, .d(cs_n), .q(cs_s));
  bit_sync u_s2 (.clk, .rst_n, .d(mosi), .q(mosi_s));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sclk_d <= 1'b0;
      cs_d   <= 1'b1;
    end else begin
      sclk_d <= sclk_s;
      cs_d   <= cs_s;
    end
  end

  assign active    = !cs_s;
  assign rise      = active && sclk_s && !sclk_d;
  assign fall      = active && !sclk_s && sclk_d;
  assign cs_fall   = !cs_s && cs_d;
  assign rx_next   = {rx_sh[FRAME_W-2:0], mosi_s};
  assign byte_done = rise && nbits == ($bits(nbits))'(FRAME_W - 1);

  assign rx_push = byte_done;
  assign rx_pop  = req.t_load && req.opc == PER_RECV && !rx_empty;
  assign tx_push = req.t_load && req.opc == PER_SEND;
  assign tx_pop  = (cs_fall || byte_done) && !tx_empty;

  sync_fifo #(.WIDTH(FRAME_W), .DEPTH(FIFO_DEPTH)) u_rx (
    .clk, .rst_n, .push(rx_push), .wdata(rx_next), .pop(rx_pop), .rdata(rx_head),
    .count(rx_count), .full(rx_full), .empty(rx_empty));

  sync_fifo #(.WIDTH(FRAME_W), .DEPTH(FIFO_DEPTH)) u_tx (
    .clk, .rst_n, .push(tx_push), .wdata(req.t[FRAME_W-1:0]), .pop(tx_pop), .rdata(tx_head),
    .count(tx_count), .full(tx_full), .empty(tx_empty));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_sh   <= '0;
      tx_sh   <= '0;
      nbits   <= '0;
      miso    <= 1'b0;
      overrun <= 1'b0;
      result  <= '0;
    end else begin
      if (cs_fall) begin
        tx_sh <= tx_empty ? '0 : tx_head;
        miso  <= tx_empty ? 1'b0 : tx_head[FRAME_W-1];
        nbits <= '0;
      end else if (rise) begin
        rx_sh <= rx_next;
        if (byte_done) begin
          nbits <= '0;
          tx_sh <= tx_empty ? '0 : tx_head;
        end else begin
          nbits <= nbits + 1'b1;
          tx_sh <= {tx_sh[FRAME_W-2:0], 1'b0};
        end
      end else if (fall) begin
        miso <= tx_sh[FRAME_W-1];
      end
      if (rx_push && rx_full) overrun <= 1'b1;
      if (req.t_load) begin
        if (req.opc == PER_STATUS) begin
          result  <= {8'd0, 5'd0, active, tx_empty, overrun,
                      8'(FIFO_DEPTH - rx_count), 8'(rx_count)};
          overrun <= 1'b0;
        end else if (req.opc == PER_RECV) begin
          result <= {23'd0, !rx_empty, rx_empty ? 8'd0 : rx_head};
        end
      end
    end
  end
endmodule
