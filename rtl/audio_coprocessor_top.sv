// Audio coprocessor for networked music performance: sits between an audio board (I2S
// converters, MIDI ports) and a host computer (SPI), and moves and processes audio
// samples with a transport triggered processor so that the added latency stays in the
// order of a few sample periods.
// Blocks: a clock manager making the 11 MHz master clock (mclk, also sent to the audio
// board), the I2S clock generator making bclk and lrclk as I2S master, the TTA core with
// its peripheral FUs, the instruction memory and the data memory. The core and the
// memories run on the system clock clk; the I2S clock generator samples mclk in the clk
// domain. The program is written into the instruction memory through the prog_* port
// while rst_n is low. The structure follows the document's top-level diagram; the
// program load port is this design's addition.
module audio_coprocessor_top
  import tta_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned DMEM_DEPTH = 4096,
  parameter int unsigned CLK_HZ     = 100_000_000,
  parameter int unsigned MIDI_BAUD  = 31_250,
  parameter int unsigned DELAY_LEN  = 4096,
  parameter int unsigned NUM_SRC    = 4,
  parameter int unsigned MCLK_PERIOD_PS = 90_909
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // program load
  input  logic                          prog_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] prog_addr,
  input  logic [INSTR_W-1:0]            prog_data,
  // audio board
  output logic                          mclk,
  output logic                          bclk,
  output logic                          lrclk,
  output logic [1:0]                    i2s_sdout,
  input  logic [1:0]                    i2s_sdin,
  input  logic [3:0]                    midi_in,
  output logic [1:0]                    midi_out,
  // host (SPI0, SPI1)
  input  logic [1:0]                    spi_sclk,
  input  logic [1:0]                    spi_cs_n,
  input  logic [1:0]                    spi_mosi,
  output logic [1:0]                    spi_miso,
  // FPGA board
  output logic [3:0]                    led,
  input  logic [3:0]                    sw,
  output logic                          pll_locked
);
  logic [$clog2(IMEM_DEPTH)-1:0] imem_addr;
  logic [INSTR_W-1:0]            imem_rdata;
  logic                          dmem_en, dmem_we;
  logic [$clog2(DMEM_DEPTH)-1:0] dmem_addr;
  logic [DATA_W-1:0]             dmem_wdata, dmem_rdata;
  logic                          bclk_rise, bclk_fall;
  logic [5:0]                    bit_idx;

  pll_mmcm_model #(.OUT_PERIOD_PS(MCLK_PERIOD_PS)) u_pll (
    .clk_in(clk), .rst_n, .clk_out(mclk), .locked(pll_locked));

  i2s_clock_gen #(.MCLK_PER_BCLK(4), .BCLK_PER_FRAME(64)) u_i2s_clk (
    .clk, .rst_n, .mclk, .bclk, .lrclk, .bclk_rise, .bclk_fall, .bit_idx);

  inst_mem #(.DEPTH(IMEM_DEPTH), .INSTR_W(INSTR_W)) u_imem (
    .clk, .raddr(imem_addr), .rdata(imem_rdata),
    .we(prog_we), .waddr(prog_addr), .wdata(prog_data));

  data_mem #(.DEPTH(DMEM_DEPTH), .WIDTH(DATA_W)) u_dmem (
    .clk, .en(dmem_en), .we(dmem_we), .addr(dmem_addr), .wdata(dmem_wdata),
    .rdata(dmem_rdata));

  tta_core #(
    .IMEM_DEPTH(IMEM_DEPTH), .DMEM_DEPTH(DMEM_DEPTH), .CLK_HZ(CLK_HZ),
    .MIDI_BAUD(MIDI_BAUD), .DELAY_LEN(DELAY_LEN), .NUM_SRC(NUM_SRC)
  ) u_core (
    .clk, .rst_n, .imem_addr, .imem_rdata,
    .dmem_en, .dmem_we, .dmem_addr, .dmem_wdata, .dmem_rdata,
    .bclk_rise, .bclk_fall, .bit_idx,
    .i2s_sdout, .i2s_sdin, .midi_out, .midi_in,
    .spi_sclk, .spi_cs_n, .spi_mosi, .spi_miso, .led, .sw);
endmodule
