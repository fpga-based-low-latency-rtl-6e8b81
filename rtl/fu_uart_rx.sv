// UART receiver functional unit (UART_RX) for MIDI input: 8 data bits, LSB first, one
// start and one stop bit, at BAUD (31250 for MIDI). The line is synchronised, a falling
// edge starts a frame, the start bit is checked half a bit later and every following bit
// is sampled in its middle. A byte with a valid stop bit enters a FIFO; a byte with a bad
// stop bit is discarded and flagged. RECV pops a byte: result = {23'0, valid, byte},
// valid = 0 when the FIFO was empty. STATUS returns {8'0, flags, free, used}; flags
// bit 0 = overrun, bit 1 = framing error, both cleared by STATUS. Rate and byte size
// follow the document; the sampling scheme, FIFO and operations are this design's.
module fu_uart_rx
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
  input  logic              rx
);
  localparam int unsigned DIV = CLK_HZ / BAUD;
  localparam int unsigned CW  = $clog2(FIFO_DEPTH) + 1;

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;

  state_e                 state;
  logic                   rx_s, push, pop, full, empty, overrun, frame_err;
  logic [7:0]             shreg, head;
  logic [2:0]             bitn;
  logic [CW-1:0]          count;
  logic [$clog2(DIV)-1:0] cnt;

  bit_sync #(.RESET_VAL(1'b1)) u_sync (.clk, .rst_n, .d(rx), .q(rx_s));

  assign push = state == STOP && cnt == '0 && rx_s;
  assign pop  = req.t_load && req.opc == PER_RECV && !empty;

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push, .wdata(shreg), .pop, .rdata(head), .count, .full, .empty);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= IDLE;
      cnt       <= '0;
      bitn      <= '0;
      shreg     <= '0;
      overrun   <= 1'b0;
      frame_err <= 1'b0;
      result    <= '0;
    end else begin
      unique case (state)
        IDLE: if (!rx_s) begin
          state <= START;
          cnt   <= $bits(cnt)'(DIV/2 - 1);
        end
        START: if (cnt == '0) begin
          if (!rx_s) begin
            state <= DATA;
            cnt   <= $bits(cnt)'(DIV - 1);
            bitn  <= '0;
          end else begin
            state <= IDLE;   // glitch, not a start bit
          end
        end else cnt <= cnt - 1'b1;
        DATA: if (cnt == '0) begin
          shreg <= {rx_s, shreg[7:1]};
          cnt   <= $bits(cnt)'(DIV - 1);
          bitn  <= bitn + 1'b1;
          if (bitn == 3'd7) state <= STOP;
        end else cnt <= cnt - 1'b1;
        STOP: if (cnt == '0) begin
          state <= IDLE;
          if (!rx_s) frame_err <= 1'b1;
          else if (full) overrun <= 1'b1;
        end else cnt <= cnt - 1'b1;
        default: state <= IDLE;
      endcase
      if (req.t_load) begin
        if (req.opc == PER_STATUS) begin
          result    <= {8'd0, 6'd0, frame_err, overrun, 8'(FIFO_DEPTH - count), 8'(count)};
          overrun   <= 1'b0;
          frame_err <= 1'b0;
        end else if (req.opc == PER_RECV) begin
          result <= {23'd0, !empty, empty ? 8'd0 : head};
        end
      end
    end
  end
endmodule
