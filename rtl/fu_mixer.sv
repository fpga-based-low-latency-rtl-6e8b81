// Mixer functional unit (MIXER_0): mixes NUM_SRC mono audio sources into a stereo pair,
// with a gain and a left-right pan position per source. Gains are unsigned Q1.15
// (0x8000 = 1.0); pan p runs from 0 (fully left) to 256 (fully right) with a linear law:
// left weight = (256 - p)/256, right weight = p/256. Operations, operand 1 = source index:
// GAIN and PAN set that source's controls, SAMPLE stores its current sample; RUN computes
// both mixes at once (sum of sample * gain * weight, saturated to 24 bits) and returns the
// left one; RIGHT returns the right mix of the last RUN. After reset every source has
// gain 1.0, centre pan and a zero sample. The document gives the function (mixing with
// per-source gain and panning); the number formats, pan law, source count and the
// operations are this design's choices.
module fu_mixer
  import tta_pkg::*;
#(
  parameter int unsigned NUM_SRC = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  fu_req_t           req,
  output logic [DATA_W-1:0] result
);
  localparam int unsigned SW = (NUM_SRC > 1) ? $clog2(NUM_SRC) : 1;

  logic [DATA_W-1:0]          o1_q, o1_eff;
  logic [SW-1:0]              sel;
  logic [15:0]                gain   [NUM_SRC];
  logic [8:0]                 pan    [NUM_SRC];
  logic signed [SAMPLE_W-1:0] sample [NUM_SRC];
  logic [DATA_W-1:0]          right_q, mix_l, mix_r;

  assign o1_eff = req.o1_load ? req.o1 : o1_q;
  assign sel    = o1_eff[SW-1:0];

  always_comb begin
    logic signed [63:0] acc_l, acc_r;
    acc_l = '0;
    acc_r = '0;
    for (int i = 0; i < NUM_SRC; i++) begin
      acc_l += 64'(sample[i]) * $signed({1'b0, 26'(gain[i]) * 26'(9'd256 - pan[i])});
      acc_r += 64'(sample[i]) * $signed({1'b0, 26'(gain[i]) * 26'(pan[i])});
    end
    mix_l = sat_sample(acc_l >>> 23);   // Q1.15 gain and /256 pan weight
    mix_r = sat_sample(acc_r >>> 23);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      o1_q    <= '0;
      right_q <= '0;
      result  <= '0;
      for (int i = 0; i < NUM_SRC; i++) begin
        gain[i]   <= 16'h8000;
        pan[i]    <= 9'd128;
        sample[i] <= '0;
      end
    end else begin
      if (req.o1_load) o1_q <= req.o1;
      if (req.t_load) begin
        unique case (req.opc)
          MIX_GAIN:   gain[sel]   <= req.t[15:0];
          MIX_PAN:    pan[sel]    <= (req.t > 32'd256) ? 9'd256 : req.t[8:0];
          MIX_SAMPLE: sample[sel] <= req.t[SAMPLE_W-1:0];
          MIX_RUN: begin
            result  <= mix_l;
            right_q <= mix_r;
          end
          MIX_RIGHT:  result <= right_q;
          default: ;
        endcase
      end
    end
  end
endmodule
