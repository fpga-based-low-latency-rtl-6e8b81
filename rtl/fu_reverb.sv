// Reverb functional unit (REVERB_0): a feedback comb filter over a long delay line, with
// a dry/wet control. For each input sample x (PROCESS), with d the sample leaving the
// delay line (written DELAY_LEN samples earlier):
//   line <- sat(x + d * fb)          fb: feedback, Q0.15 (default 0.5)
//   out  =  sat(((256 - wet) * x + wet * d) / 256)   wet: 0 (dry) .. 256 (wet only)
// The result is available to the next instruction. After reset the unit spends DELAY_LEN
// cycles writing zeros into the delay line; a PROCESS in that time returns the dry
// sample and leaves the line alone. The line is a plain array with asynchronous read,
// meant for distributed (LUT) RAM. The document gives the function (reverb with dry/wet
// control, long delay lines in LUT RAM); the comb structure, delay length, number
// formats and the clearing are this design's choices.
module fu_reverb
  import tta_pkg::*;
#(
  parameter int unsigned DELAY_LEN = 4096
) (
  input  logic              clk,
  input  logic              rst_n,
  input  fu_req_t           req,
  output logic [DATA_W-1:0] result,
  output logic              busy        // clearing the delay line after reset
);
  localparam int unsigned AW = $clog2(DELAY_LEN);

  logic [SAMPLE_W-1:0]        line [DELAY_LEN];
  logic [AW-1:0]              ptr;
  logic [8:0]                 wet;
  logic [15:0]                fb;
  logic signed [SAMPLE_W-1:0] x, d;
  logic [DATA_W-1:0]          comb, out;
  logic                       proc;

  assign x    = req.t[SAMPLE_W-1:0];
  assign d    = line[ptr];
  assign proc = req.t_load && req.opc == REV_PROCESS;
  assign comb = sat_sample(64'(x) + ((64'(d) * $signed({1'b0, fb})) >>> 15));
  assign out  = sat_sample((64'(x) * $signed({1'b0, 9'd256 - wet}) +
                            64'(d) * $signed({1'b0, wet})) >>> 8);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr    <= '0;
      busy   <= 1'b1;
      wet    <= '0;
      fb     <= 16'h4000;
      result <= '0;
    end else begin
      if (busy) begin
        ptr <= ptr + 1'b1;
        if (ptr == AW'(DELAY_LEN - 1)) begin
          busy <= 1'b0;
          ptr  <= '0;
        end
      end else if (proc) begin
        ptr <= (ptr == AW'(DELAY_LEN - 1)) ? '0 : ptr + 1'b1;
      end
      if (req.t_load) begin
        unique case (req.opc)
          REV_WET:     wet <= (req.t > 32'd256) ? 9'd256 : req.t[8:0];
          REV_FB:      fb  <= req.t[15:0];
          REV_PROCESS: result <= busy ? DATA_W'(x) : out;
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (busy)      line[ptr] <= '0;
    else if (proc) line[ptr] <= comb[SAMPLE_W-1:0];
  end
endmodule
