// UART transmitter functional unit (UART_TX) for MIDI output: 8 data bits, LSB first,
// one start and one stop bit, no parity, at BAUD (31250 for MIDI) derived from the
// system clock by an integer divider. SEND pushes the low byte of the moved value into a
// FIFO; the transmitter takes the next byte as soon as the line is idle, so queued
// bytes go out back to back, one every 10 bit times. STATUS returns
// {8'0, flags, free, used}; flags bit 0 = a byte was dropped because the FIFO was full,
// bit 1 = a byte is being sent. The line idles high. Rate and byte size follow the
// document; the frame format (standard MIDI), FIFO and operations are this design's.
module fu_uart_tx
  import tta_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 100_000_000,
  parameter int unsigned BAUD       = 31_250,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  fu_req_t           req,
  output logic [DATA_W-1:0] result,
  output logic              tx
);
  localparam int unsigned DIV = CLK_HZ / BAUD;
  localparam int unsigned CW  = $clog2(FIFO_DEPTH) + 1;

  logic [7:0]            head;
  logic [CW-1:0]         count;
  logic                  full, empty, push, pop, dropped, busy;
  logic [9:0]            shreg;
  logic [3:0]            nbits;
  logic [$clog2(DIV)-1:0] baud_cnt;

  logic last_tick;   // final cycle of the stop bit: the next byte may start now

  assign push      = req.t_load && req.opc == PER_SEND;
  assign last_tick = nbits == 4'd1 && baud_cnt == $bits(baud_cnt)'(DIV - 1);
  assign pop       = (!busy || last_tick) && !empty;

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push, .wdata(req.t[7:0]), .pop, .rdata(head), .count, .full, .empty);

  assign busy = nbits != '0;
  assign tx   = busy ? shreg[0] : 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shreg    <= '1;
      nbits    <= '0;
      baud_cnt <= '0;
      dropped  <= 1'b0;
      result   <= '0;
    end else begin
      if (pop) begin
        shreg    <= {1'b1, head, 1'b0};
        nbits    <= 4'd10;
        baud_cnt <= '0;
      end else if (busy) begin
        if (baud_cnt == $bits(baud_cnt)'(DIV - 1)) begin
          baud_cnt <= '0;
          shreg    <= {1'b1, shreg[9:1]};
          nbits    <= nbits - 1'b1;
        end else begin
          baud_cnt <= baud_cnt + 1'b1;
        end
      end
      if (push && full) dropped <= 1'b1;
      if (req.t_load && req.opc == PER_STATUS) begin
        result  <= {8'd0, 6'd0, busy, dropped, 8'(FIFO_DEPTH - count), 8'(count)};
        dropped <= 1'b0;
      end
    end
  end
endmodule
