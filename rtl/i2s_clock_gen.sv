// I2S clock generator. The coprocessor is the I2S master, so it produces the bit clock
// (bclk) and the left-right clock (lrclk) for the audio board from the 11 MHz master
// clock. The generator runs in the system clock domain: it synchronises mclk, counts its
// rising edges, toggles bclk every MCLK_PER_BCLK/2 of them, and advances a bit counter
// on every falling edge of bclk. A frame has BCLK_PER_FRAME bit clocks: lrclk is high for
// the first half (left slot) and low for the second (right slot), as left-justified
// converters expect. Alongside the pins it gives the I2S FUs single-cycle strobes
// (bclk_rise, bclk_fall) and the index of the bit now on the line (bit_idx, changes with
// bclk_fall). All outputs are registered and change together. The system clock must be
// at least four times mclk. Frame length follows from the document's 32-bit slots;
// the mclk to bclk ratio is this design's choice (256 mclk per frame).
module i2s_clock_gen #(
  parameter int unsigned MCLK_PER_BCLK  = 4,
  parameter int unsigned BCLK_PER_FRAME = 64
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              mclk,
  output logic                              bclk,
  output logic                              lrclk,
  output logic                              bclk_rise,
  output logic                              bclk_fall,
  output logic [$clog2(BCLK_PER_FRAME)-1:0] bit_idx
);
  localparam int unsigned MW = $clog2(MCLK_PER_BCLK);
  localparam int unsigned BW = $clog2(BCLK_PER_FRAME);

  logic          mclk_s, mclk_d, mclk_rise;
  logic [MW-1:0] mdiv;

  bit_sync u_sync (.clk, .rst_n, .d(mclk), .q(mclk_s));

  always_ff @(posedge clk) begin
    if (!rst_n) mclk_d <= 1'b0;
    else        mclk_d <= mclk_s;
  end
  assign mclk_rise = mclk_s && !mclk_d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mdiv      <= '0;
      bclk      <= 1'b0;
      lrclk     <= 1'b0;
      bit_idx   <= BW'(BCLK_PER_FRAME - 1);
      bclk_rise <= 1'b0;
      bclk_fall <= 1'b0;
    end else begin
      bclk_rise <= 1'b0;
      bclk_fall <= 1'b0;
      if (mclk_rise) begin
        mdiv <= (mdiv == MW'(MCLK_PER_BCLK - 1)) ? '0 : mdiv + 1'b1;
        if (mdiv == MW'(MCLK_PER_BCLK/2 - 1)) begin
          bclk      <= 1'b1;
          bclk_rise <= 1'b1;
        end else if (mdiv == MW'(MCLK_PER_BCLK - 1)) begin
          bclk      <= 1'b0;
          bclk_fall <= 1'b1;
          bit_idx   <= (bit_idx == BW'(BCLK_PER_FRAME - 1)) ? '0 : bit_idx + 1'b1;
          lrclk     <= (bit_idx == BW'(BCLK_PER_FRAME - 1)) || (bit_idx < BW'(BCLK_PER_FRAME/2 - 1));
        end
      end
    end
  end
endmodule
