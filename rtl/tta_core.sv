// TTA core: a transport triggered processor whose only instruction is the move. Each
// instruction holds NUM_BUSES move slots, one per 32-bit transport bus, and all slots
// execute in the same cycle. The global control unit fetches one instruction per cycle
// from the instruction memory (one cycle read latency, hence one branch delay slot). The
// interconnect delivers each move to its destination; a move into a trigger port starts
// that FU's operation and its result is readable by the next instruction.
// FUs (numbering in tta_pkg): register file, boolean register file, ALU, GCU, LSU,
// timer, LED and switch drivers, two I2S left-justified transmitters and receivers (I2S0,
// I2S1), two UART transmitters (MIDI OUT 0-1), four UART receivers (MIDI IN 0-3), two SPI
// slaves (SPI0, SPI1), the mixer and the reverb. The FU set, the four 32-bit buses and
// the full connectivity follow the document; the instruction encoding, pipeline and FU
// operations are this design's own.
module tta_core
  import tta_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned DMEM_DEPTH = 4096,
  parameter int unsigned CLK_HZ     = 100_000_000,
  parameter int unsigned MIDI_BAUD  = 31_250,
  parameter int unsigned DELAY_LEN  = 4096,
  parameter int unsigned NUM_SRC    = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // instruction memory
  output logic [$clog2(IMEM_DEPTH)-1:0] imem_addr,
  input  logic [INSTR_W-1:0]            imem_rdata,
  // data memory
  output logic                          dmem_en,
  output logic                          dmem_we,
  output logic [$clog2(DMEM_DEPTH)-1:0] dmem_addr,
  output logic [DATA_W-1:0]             dmem_wdata,
  input  logic [DATA_W-1:0]             dmem_rdata,
  // from the I2S clock generator
  input  logic                          bclk_rise,
  input  logic                          bclk_fall,
  input  logic [5:0]                    bit_idx,
  // audio board
  output logic [1:0]                    i2s_sdout,
  input  logic [1:0]                    i2s_sdin,
  output logic [1:0]                    midi_out,
  input  logic [3:0]                    midi_in,
  // host
  input  logic [1:0]                    spi_sclk,
  input  logic [1:0]                    spi_cs_n,
  input  logic [1:0]                    spi_mosi,
  output logic [1:0]                    spi_miso,
  // FPGA board
  output logic [3:0]                    led,
  input  logic [3:0]                    sw
);
  localparam int unsigned NB = NUM_BUSES;

  logic                          exec_valid;
  move_t [NB-1:0]                moves;
  logic [1:0]                    bools;
  logic [NUM_FU-1:0][DATA_W-1:0] res;
  fu_req_t [NUM_FU-1:0]          req;
  logic [NB-1:0][3:0]            rf_raddr, rf_waddr;
  logic [NB-1:0][DATA_W-1:0]     rf_rdata, rf_wdata;
  logic [NB-1:0]                 rf_we, bool_we, bool_wdata;
  logic [NB-1:0][0:0]            bool_waddr;
  logic                          reverb_busy;

  assign moves = imem_rdata;

  tta_interconnect #(.NB(NB), .NUM_BOOLS(2)) u_ic (
    .clk, .exec_valid, .moves, .bools, .fu_result(res), .fu_req(req),
    .rf_raddr, .rf_rdata, .rf_we, .rf_waddr, .rf_wdata,
    .bool_we, .bool_waddr, .bool_wdata);

  reg_file #(.NUM_REGS(16), .NB(NB)) u_rf (
    .clk, .rst_n, .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata),
    .raddr(rf_raddr), .rdata(rf_rdata));

  bool_rf #(.NUM_BOOLS(2), .NB(NB)) u_bool (
    .clk, .rst_n, .we(bool_we), .waddr(bool_waddr), .wdata(bool_wdata), .bools);

  fu_gcu #(.PC_W($clog2(IMEM_DEPTH))) u_gcu (
    .clk, .rst_n, .req(req[FU_GCU]), .pc(imem_addr), .exec_valid, .result(res[FU_GCU]));

  fu_alu u_alu (.clk, .rst_n, .req(req[FU_ALU]), .result(res[FU_ALU]));

  fu_lsu #(.ADDR_W($clog2(DMEM_DEPTH))) u_lsu (
    .clk, .rst_n, .req(req[FU_LSU]), .result(res[FU_LSU]),
    .mem_en(dmem_en), .mem_we(dmem_we), .mem_addr(dmem_addr),
    .mem_wdata(dmem_wdata), .mem_rdata(dmem_rdata));

  fu_timer u_timer (.clk, .rst_n, .req(req[FU_TIMER]), .result(res[FU_TIMER]));

  fu_led_driver #(.NUM_LEDS(4)) u_led (
    .clk, .rst_n, .req(req[FU_LED]), .result(res[FU_LED]), .led);

  fu_switch_driver #(.NUM_SW(4)) u_sw (
    .clk, .rst_n, .req(req[FU_SW]), .result(res[FU_SW]), .sw);

  for (genvar i = 0; i < 2; i++) begin : g_i2s
    fu_i2s_lj_tx u_tx (
      .clk, .rst_n, .req(req[FU_I2S_TX0 + i]), .result(res[FU_I2S_TX0 + i]),
      .bclk_fall, .bit_idx, .sdout(i2s_sdout[i]));
    fu_i2s_lj_rx u_rx (
      .clk, .rst_n, .req(req[FU_I2S_RX0 + i]), .result(res[FU_I2S_RX0 + i]),
      .bclk_rise, .bit_idx, .sdin(i2s_sdin[i]));
  end

  for (genvar i = 0; i < 2; i++) begin : g_uart_tx
    fu_uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(MIDI_BAUD)) u_tx (
      .clk, .rst_n, .req(req[FU_UART_TX0 + i]), .result(res[FU_UART_TX0 + i]),
      .tx(midi_out[i]));
  end

  for (genvar i = 0; i < 4; i++) begin : g_uart_rx
    fu_uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(MIDI_BAUD)) u_rx (
      .clk, .rst_n, .req(req[FU_UART_RX0 + i]), .result(res[FU_UART_RX0 + i]),
      .rx(midi_in[i]));
  end

  for (genvar i = 0; i < 2; i++) begin : g_spi
    fu_spi_slave u_spi (
      .clk, .rst_n, .req(req[FU_SPI0 + i]), .result(res[FU_SPI0 + i]),
      .sclk(spi_sclk[i]), .cs_n(spi_cs_n[i]), .mosi(spi_mosi[i]), .miso(spi_miso[i]));
  end

  fu_mixer #(.NUM_SRC(NUM_SRC)) u_mixer (
    .clk, .rst_n, .req(req[FU_MIXER]), .result(res[FU_MIXER]));

  fu_reverb #(.DELAY_LEN(DELAY_LEN)) u_reverb (
    .clk, .rst_n, .req(req[FU_REVERB]), .result(res[FU_REVERB]), .busy(reverb_busy));

  // Register files are read through their own ports; unused FU numbers read as 0.
  assign res[FU_RF]   = '0;
  assign res[FU_BOOL] = '0;
  for (genvar f = int'(FU_REVERB) + 1; f < NUM_FU; f++) begin : g_unused
    assign res[f] = '0;
  end
endmodule
