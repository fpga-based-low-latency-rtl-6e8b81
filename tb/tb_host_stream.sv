// Host-link streaming test of the audio coprocessor at its default parameters. The
// program loaded here is a small version of the coprocessor's command loop, written as
// a state machine: WAIT_PREAMBLE (collect the preamble from SPI0), WAIT_COMMAND (read the
// command, sent twice for redundancy, and answer NACK when the copies differ or the
// command is unknown), CONFIG (command 1: set s_n, the frames per packet, answer ACK),
// STREAM (command 2: capture s_n frames from both I2S inputs, i.e. four channels, answer
// ACK and send them to the host as 16-bit samples) and STREAM_MIX (command 3: receive s_n
// frames of four 16-bit sources from the host, mix them in the mixer unit, play the
// stereo mix on I2S0 out and answer ACK at the end).
// Byte values are this test's own: preamble = six bytes 0xA5, command byte sent twice,
// ACK = 0x06, NACK = 0x15, so preamble plus command is 8 bytes. A STREAM packet is the
// ACK byte followed by s_n frames x 4 channels x {bits 23:16, bits 15:8} of each sample,
// channel order I2S0 left, I2S0 right, I2S1 left, I2S1 right. A STREAM_MIX packet is
// s_n frames x 4 sources x {high byte, low byte}; the host sends one frame per audio
// frame period.
// The test plays the host (SPI master, 80 ns SCLK half period; it clocks dummy bytes
// until an answer arrives), two left-justified ADCs and a DAC. It checks: NACK for a
// corrupted and for an unknown command, ACK for commands 1, 2 and 3, a packet of exactly
// 4 x 2 x s_n data bytes for s_n = 8 and for s_n = 112 (8 + 896 = 904 bytes per
// exchange), the sample values, that the four channels come from the same frames, that
// the captured frames are consecutive and recent, and every mixed frame at the DAC
// (including saturated ones). Each mechanism is counted.
module tb_host_stream;
  import tta_pkg::*;
  import tta_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic prog_we = 0;
  logic [9:0] prog_addr = '0;
  logic [127:0] prog_data = '0;
  logic mclk, bclk, lrclk, pll_locked;
  logic [1:0] i2s_sdout, midi_out, spi_miso;
  logic [1:0] i2s_sdin = '0;
  logic [3:0] midi_in = 4'hF, led, sw = 4'h0;
  logic [1:0] spi_sclk = '0, spi_cs_n = 2'b11, spi_mosi = '0;
  int checks = 0, failures = 0;

  audio_coprocessor_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // ---------------- program ----------------
  localparam int WP = 1, WC = 13, NACK = 32, CFG = 34, STR = 42, CAP = 50, SND = 66;
  localparam int MIX = 80, MFR = 81, MSRC = 82, TXW = 105, PLEN = 120;
  localparam int PRE = 8'hA5, ACK_B = 8'h06, NACK_B = 8'h15;
  logic [127:0] prog [PLEN];

  // wait for a byte from SPI0: it lands in register rd as {valid, byte}
  function automatic void get_byte(int a, int rd);
    prog[a]     = I(MI(0, D(FU_SPI0, P_TRIG, PER_RECV)));
    prog[a + 1] = I(MS(FU_SPI0, 0, R(rd)), MS(FU_SPI0, 0, D(FU_ALU, P_OP1)), MI(8, D(FU_ALU, P_TRIG, ALU_SHRU)));
    prog[a + 2] = I(MS(FU_ALU, 0, B(0)));
    prog[a + 3] = I(MI(a, D(FU_GCU, P_TRIG, GCU_JUMP), G_NB0));
  endfunction

  initial begin
    for (int a = 0; a < PLEN; a++) prog[a] = I(NOP);
    // r1 byte, r2 preamble count, r3 s_n, r4 address / frame count, r5 end address,
    // r6 command copy, r7 temp, r8 mixer source, r9 temp; mixer source 0 panned hard left
    prog[0]  = I(MI(112, R(3)), MI(0, R(2)), MI(0, D(FU_MIXER, P_OP1)), MI(0, D(FU_MIXER, P_TRIG, MIX_PAN)));
    // WAIT_PREAMBLE
    get_byte(WP, 1);                                                     // 1..4, 5 delay slot
    prog[6]  = I(MS(FU_RF, 1, D(FU_ALU, P_OP1)), MI(PRE | 32'h100, D(FU_ALU, P_TRIG, ALU_EQ)));
    prog[7]  = I(MS(FU_ALU, 0, B(0)), MS(FU_RF, 2, D(FU_ALU, P_OP1)), MI(1, D(FU_ALU, P_TRIG, ALU_ADD)));
    prog[8]  = I(MS(FU_ALU, 0, R(2), G_B0), MI(0, R(2), G_NB0));
    prog[9]  = I(MS(FU_RF, 2, D(FU_ALU, P_OP1)), MI(6, D(FU_ALU, P_TRIG, ALU_EQ)));
    prog[10] = I(MS(FU_ALU, 0, B(0)));
    prog[11] = I(MI(WP, D(FU_GCU, P_TRIG, GCU_JUMP), G_NB0));
    // WAIT_COMMAND: two copies of the command
    get_byte(WC, 6);                                                     // 13..16, 17 delay slot
    get_byte(18, 1);                                                     // 18..21
    prog[22] = I(MI(0, R(2)));                                           // delay slot: restart preamble count
    prog[23] = I(MS(FU_RF, 1, D(FU_ALU, P_OP1)), MS(FU_RF, 6, D(FU_ALU, P_TRIG, ALU_EQ)));
    prog[24] = I(MS(FU_ALU, 0, B(0)));
    prog[25] = I(MI(NACK, D(FU_GCU, P_TRIG, GCU_JUMP), G_NB0));
    prog[26] = I(MS(FU_RF, 1, D(FU_ALU, P_OP1)), MI(32'h101, D(FU_ALU, P_TRIG, ALU_EQ)));
    prog[27] = I(MS(FU_ALU, 0, B(0)), MS(FU_RF, 1, D(FU_ALU, P_OP1)), MI(32'h102, D(FU_ALU, P_TRIG, ALU_EQ)));
    prog[28] = I(MS(FU_ALU, 0, B(1)), MI(CFG, D(FU_GCU, P_TRIG, GCU_JUMP), G_B0));
    prog[29] = I(MS(FU_RF, 1, D(FU_ALU, P_OP1)), MI(32'h103, D(FU_ALU, P_TRIG, ALU_EQ)));
    prog[30] = I(MS(FU_ALU, 0, B(0)), MI(STR, D(FU_GCU, P_TRIG, GCU_JUMP), G_B1));
    // command 3 -> STREAM_MIX, otherwise NACK (b0 is 0 when coming from the copy check)
    prog[NACK] = I(MI(NACK_B, D(FU_SPI0, P_TRIG, PER_SEND), G_NB0), MI(WP, D(FU_GCU, P_TRIG, GCU_JUMP), G_NB0),
                   MI(MIX, D(FU_GCU, P_TRIG, GCU_JUMP), G_B0));
    // CONFIG: one byte, the number of frames per packet
    get_byte(CFG, 1);                                                    // 34..37, 38 delay slot
    prog[39] = I(MS(FU_RF, 1, D(FU_ALU, P_OP1)), MI(255, D(FU_ALU, P_TRIG, ALU_AND)));
    prog[40] = I(MS(FU_ALU, 0, R(3)), MI(ACK_B, D(FU_SPI0, P_TRIG, PER_SEND)), MI(WP, D(FU_GCU, P_TRIG, GCU_JUMP)));
    // STREAM: drop stale frames, then capture s_n frames of both I2S inputs
    prog[STR] = I(MI(0, D(FU_I2S_RX0, P_TRIG, PER_STATUS)));
    prog[43] = I(MS(FU_I2S_RX0, 0, D(FU_ALU, P_OP1)), MI(255, D(FU_ALU, P_TRIG, ALU_AND)));
    prog[44] = I(MS(FU_ALU, 0, D(FU_ALU, P_OP1)), MI(0, D(FU_ALU, P_TRIG, ALU_GTU)));
    prog[45] = I(MS(FU_ALU, 0, B(0)));
    prog[46] = I(MI(STR, D(FU_GCU, P_TRIG, GCU_JUMP), G_B0));
    prog[47] = I(MI(0, D(FU_I2S_RX0, P_TRIG, PER_RECV), G_B0), MI(0, D(FU_I2S_RX1, P_TRIG, PER_RECV), G_B0));
    prog[48] = I(MS(FU_RF, 3, D(FU_ALU, P_OP1)), MI(2, D(FU_ALU, P_TRIG, ALU_SHL)), MI(0, R(4)));
    prog[49] = I(MS(FU_ALU, 0, R(5)));
    prog[CAP] = I(MI(0, D(FU_I2S_RX0, P_TRIG, PER_STATUS)));
    prog[51] = I(MS(FU_I2S_RX0, 0, D(FU_ALU, P_OP1)), MI(255, D(FU_ALU, P_TRIG, ALU_AND)));
    prog[52] = I(MS(FU_ALU, 0, D(FU_ALU, P_OP1)), MI(0, D(FU_ALU, P_TRIG, ALU_GTU)));
    prog[53] = I(MS(FU_ALU, 0, B(0)));
    prog[54] = I(MI(CAP, D(FU_GCU, P_TRIG, GCU_JUMP), G_NB0));
    prog[56] = I(MI(0, D(FU_I2S_RX0, P_TRIG, PER_RECV)), MI(0, D(FU_I2S_RX1, P_TRIG, PER_RECV)),
                 MS(FU_RF, 4, D(FU_ALU, P_OP1)), MI(1, D(FU_ALU, P_TRIG, ALU_ADD)));
    prog[57] = I(MS(FU_I2S_RX0, 0, D(FU_LSU, P_OP1)), MS(FU_RF, 4, D(FU_LSU, P_TRIG, LSU_ST)),
                 MI(0, D(FU_I2S_RX0, P_TRIG, PER_RIGHT)), MS(FU_ALU, 0, R(7)));
    prog[58] = I(MS(FU_I2S_RX0, 0, D(FU_LSU, P_OP1)), MS(FU_RF, 7, D(FU_LSU, P_TRIG, LSU_ST)),
                 MI(2, D(FU_ALU, P_TRIG, ALU_ADD)));
    prog[59] = I(MS(FU_I2S_RX1, 0, D(FU_LSU, P_OP1)), MS(FU_ALU, 0, D(FU_LSU, P_TRIG, LSU_ST)),
                 MI(0, D(FU_I2S_RX1, P_TRIG, PER_RIGHT)), MI(3, D(FU_ALU, P_TRIG, ALU_ADD)));
    prog[60] = I(MS(FU_I2S_RX1, 0, D(FU_LSU, P_OP1)), MS(FU_ALU, 0, D(FU_LSU, P_TRIG, LSU_ST)),
                 MI(4, D(FU_ALU, P_TRIG, ALU_ADD)));
    prog[61] = I(MS(FU_ALU, 0, R(4)), MS(FU_ALU, 0, D(FU_ALU, P_OP1)), MS(FU_RF, 5, D(FU_ALU, P_TRIG, ALU_EQ)));
    prog[62] = I(MS(FU_ALU, 0, B(0)));
    prog[63] = I(MI(CAP, D(FU_GCU, P_TRIG, GCU_JUMP), G_NB0));
    // then ACK and the samples, two bytes per stored word, whenever the SPI transmit FIFO is empty
    prog[65] = I(MI(ACK_B, D(FU_SPI0, P_TRIG, PER_SEND)), MI(0, R(4)));
    prog[SND] = I(MI(0, D(FU_SPI0, P_TRIG, PER_STATUS)), MS(FU_RF, 4, D(FU_LSU, P_TRIG, LSU_LD)));
    prog[67] = I(MS(FU_SPI0, 0, D(FU_ALU, P_OP1)), MI(17, D(FU_ALU, P_TRIG, ALU_SHRU)), MS(FU_LSU, 0, R(7)));
    prog[68] = I(MS(FU_ALU, 0, B(0)));
    prog[69] = I(MI(SND, D(FU_GCU, P_TRIG, GCU_JUMP), G_NB0));
    prog[70] = I(MS(FU_RF, 7, D(FU_ALU, P_OP1)), MI(16, D(FU_ALU, P_TRIG, ALU_SHRU)));
    prog[71] = I(MS(FU_ALU, 0, D(FU_SPI0, P_TRIG, PER_SEND)), MS(FU_RF, 7, D(FU_ALU, P_OP1)),
                 MI(8, D(FU_ALU, P_TRIG, ALU_SHRU)));
    prog[72] = I(MS(FU_ALU, 0, D(FU_SPI0, P_TRIG, PER_SEND)), MS(FU_RF, 4, D(FU_ALU, P_OP1)),
                 MI(1, D(FU_ALU, P_TRIG, ALU_ADD)));
    prog[73] = I(MS(FU_ALU, 0, R(4)), MS(FU_ALU, 0, D(FU_ALU, P_OP1)), MS(FU_RF, 5, D(FU_ALU, P_TRIG, ALU_EQ)));
    prog[74] = I(MS(FU_ALU, 0, B(0)));
    prog[75] = I(MI(SND, D(FU_GCU, P_TRIG, GCU_JUMP), G_NB0));
    prog[77] = I(MI(WP, D(FU_GCU, P_TRIG, GCU_JUMP)));
    // STREAM_MIX: s_n frames of NUM_SRC 16-bit samples from the host, mixed and played on I2S0
    prog[MIX] = I(MI(0, R(4)));
    prog[MFR] = I(MI(0, R(8)));
    get_byte(MSRC, 1);                                                   // 82..85, 86 delay slot
    prog[87]  = I(MS(FU_RF, 1, D(FU_ALU, P_OP1)), MI(24, D(FU_ALU, P_TRIG, ALU_SHL)));
    prog[88]  = I(MS(FU_ALU, 0, R(9)));
    get_byte(89, 1);                                                     // 89..92, 93 delay slot
    prog[94]  = I(MS(FU_RF, 1, D(FU_ALU, P_OP1)), MI(255, D(FU_ALU, P_TRIG, ALU_AND)));
    prog[95]  = I(MS(FU_ALU, 0, D(FU_ALU, P_OP1)), MI(16, D(FU_ALU, P_TRIG, ALU_SHL)));
    prog[96]  = I(MS(FU_ALU, 0, D(FU_ALU, P_OP1)), MS(FU_RF, 9, D(FU_ALU, P_TRIG, ALU_IOR)));
    prog[97]  = I(MS(FU_ALU, 0, D(FU_ALU, P_OP1)), MI(8, D(FU_ALU, P_TRIG, ALU_SHR)));
    prog[98]  = I(MS(FU_RF, 8, D(FU_MIXER, P_OP1)), MS(FU_ALU, 0, D(FU_MIXER, P_TRIG, MIX_SAMPLE)),
                  MS(FU_RF, 8, D(FU_ALU, P_OP1)), MI(1, D(FU_ALU, P_TRIG, ALU_ADD)));
    prog[99]  = I(MS(FU_ALU, 0, R(8)), MS(FU_ALU, 0, D(FU_ALU, P_OP1)), MI(4, D(FU_ALU, P_TRIG, ALU_EQ)));
    prog[100] = I(MS(FU_ALU, 0, B(0)));
    prog[101] = I(MI(MSRC, D(FU_GCU, P_TRIG, GCU_JUMP), G_NB0));
    prog[103] = I(MI(0, D(FU_MIXER, P_TRIG, MIX_RUN)));
    prog[104] = I(MS(FU_MIXER, 0, R(9)), MI(0, D(FU_MIXER, P_TRIG, MIX_RIGHT)));
    prog[TXW] = I(MI(0, D(FU_I2S_TX0, P_TRIG, PER_STATUS)));
    prog[106] = I(MS(FU_I2S_TX0, 0, D(FU_ALU, P_OP1)), MI(8, D(FU_ALU, P_TRIG, ALU_SHRU)));
    prog[107] = I(MS(FU_ALU, 0, D(FU_ALU, P_OP1)), MI(255, D(FU_ALU, P_TRIG, ALU_AND)));
    prog[108] = I(MS(FU_ALU, 0, D(FU_ALU, P_OP1)), MI(0, D(FU_ALU, P_TRIG, ALU_GTU)));
    prog[109] = I(MS(FU_ALU, 0, B(0)));
    prog[110] = I(MI(TXW, D(FU_GCU, P_TRIG, GCU_JUMP), G_NB0));
    prog[112] = I(MS(FU_RF, 9, D(FU_I2S_TX0, P_OP1)), MS(FU_MIXER, 0, D(FU_I2S_TX0, P_TRIG, PER_SEND)),
                  MS(FU_RF, 4, D(FU_ALU, P_OP1)), MI(1, D(FU_ALU, P_TRIG, ALU_ADD)));
    prog[113] = I(MS(FU_ALU, 0, R(4)), MS(FU_ALU, 0, D(FU_ALU, P_OP1)), MS(FU_RF, 3, D(FU_ALU, P_TRIG, ALU_EQ)));
    prog[114] = I(MS(FU_ALU, 0, B(0)));
    prog[115] = I(MI(MFR, D(FU_GCU, P_TRIG, GCU_JUMP), G_NB0));
    prog[117] = I(MI(ACK_B, D(FU_SPI0, P_TRIG, PER_SEND)), MI(WP, D(FU_GCU, P_TRIG, GCU_JUMP)));
  end

  // ---------------- two ADCs (I2S0, I2S1 inputs) ----------------
  localparam int NF = 1024;
  logic [47:0] gen [2][NF];
  int fidx = -1, abit = 0;
  logic aprev = 0;
  initial for (int p = 0; p < 2; p++) for (int i = 0; i < NF; i++) gen[p][i] = {24'($urandom), 24'($urandom)};
  always @(negedge bclk) begin
    if (lrclk != aprev) begin
      abit = 0;
      if (lrclk) fidx++;
    end
    aprev = lrclk;
    for (int p = 0; p < 2; p++)
      i2s_sdin[p] = (fidx >= 0 && fidx < NF && abit < 24) ?
                    (lrclk ? gen[p][fidx][47 - abit] : gen[p][fidx][23 - abit]) : 1'b0;
    abit++;
  end

  // ---------------- host (SPI master on SPI0) ----------------
  task automatic spi_xfer(input logic [7:0] out, output logic [7:0] in);
    for (int i = 7; i >= 0; i--) begin
      spi_mosi[0] = out[i];
      repeat (8) @(posedge clk);
      spi_sclk[0] = 1; in[i] = spi_miso[0];
      repeat (8) @(posedge clk);
      spi_sclk[0] = 0;
    end
  endtask

  // preamble, command twice (the second copy may differ), optional config byte, then
  // dummy bytes until a non-zero answer
  task automatic command(input logic [7:0] c0, input logic [7:0] c1, input int cfg,
                         output logic [7:0] answer);
    logic [7:0] d;
    for (int i = 0; i < 6; i++) spi_xfer(8'(PRE), d);
    spi_xfer(c0, d);
    spi_xfer(c1, d);
    if (cfg >= 0) spi_xfer(8'(cfg), d);
    answer = 0;
    for (int n = 0; n < 10000 && answer == 0; n++) spi_xfer(8'h00, answer);
  endtask

  // ---------------- DAC on I2S0 out ----------------
  logic [47:0] dac_frames [$];
  logic [23:0] dl, dcur;
  logic dprev = 0;
  int dbit = 0;
  always @(posedge bclk) begin
    if (lrclk != dprev) begin
      if (!lrclk) dl = dcur;
      else if (dbit >= 32) dac_frames.push_back({dl, dcur});
      dbit = 0;
      dcur = '0;
    end
    if (dbit < 24) dcur = {dcur[22:0], i2s_sdout[0]};
    dbit++;
    dprev = lrclk;
  end

  function automatic logic [23:0] sat24(longint v);
    if (v > 64'sd8388607) return 24'h7FFFFF;
    if (v < -64'sd8388608) return 24'h800000;
    return 24'(v);
  endfunction

  int n_mixed_ok = 0, n_saturated = 0, n_mix_packets = 0;

  // STREAM_MIX: the host sends one frame of 4 sources every frame period; the program
  // mixes them (source 0 hard left, the others centred, unity gain) and plays the mix
  // on I2S0. Expected: L = sat((256 s0 + 128 (s1 + s2 + s3)) / 256), R = sat(128 (s1 + s2 + s3) / 256).
  task automatic stream_mix(int sn);
    logic [7:0] d, ans;
    logic [15:0] smp [$];
    logic [47:0] expq [$];
    int first, base;
    for (int i = 0; i < 6; i++) spi_xfer(8'(PRE), d);
    spi_xfer(8'h03, d);
    spi_xfer(8'h03, d);
    base = dac_frames.size();
    for (int f = 0; f < sn; f++) begin
      longint s [4];
      longint l, r;
      @(posedge lrclk);
      for (int ch = 0; ch < 4; ch++) begin
        logic [15:0] v;
        v = 16'($urandom);
        if (f % 8 == 0) v = (ch == 0) ? 16'h7FFF : v;   // drive the left mix into saturation now and then
        if (f % 8 == 0 && ch > 0) v = 16'h7000;
        spi_xfer(v[15:8], d);
        spi_xfer(v[7:0], d);
        s[ch] = longint'($signed({v, 8'h00}));
      end
      l = (256 * s[0] + 128 * (s[1] + s[2] + s[3])) >>> 8;
      r = (128 * (s[1] + s[2] + s[3])) >>> 8;
      expq.push_back({sat24(l), sat24(r)});
      if (l > 64'sd8388607 || l < -64'sd8388608) n_saturated++;
    end
    ans = 0;
    for (int n = 0; n < 100 && ans == 0; n++) spi_xfer(8'h00, ans);
    check("ACK after STREAM_MIX packet", 32'(ans), ACK_B);
    repeat (6 * 2400) @(posedge clk);
    first = -1;
    for (int k = base; k < dac_frames.size(); k++)
      if (dac_frames[k] == expq[0]) begin first = k; break; end
    check("first mixed frame reaches the DAC", 32'(first >= 0), 1);
    if (first >= 0 && first + sn <= dac_frames.size()) begin
      for (int f = 0; f < sn; f++) begin
        check($sformatf("mix frame %0d left", f), 32'(dac_frames[first + f][47:24]), 32'(expq[f][47:24]));
        check($sformatf("mix frame %0d right", f), 32'(dac_frames[first + f][23:0]), 32'(expq[f][23:0]));
        if (dac_frames[first + f] == expq[f]) n_mixed_ok++;
      end
      if (n_mixed_ok == sn) n_mix_packets++;
    end else check("all mixed frames reach the DAC", 0, 1);
  endtask

  int n_nack = 0, n_ack = 0, n_cfg = 0, n_packets = 0, n_samples_ok = 0, n_stale_dropped = 0;

  task automatic stream(int sn);
    logic [7:0] ans, b;
    logic [15:0] got [4];
    int f0, ok, f_ack;
    command(8'h02, 8'h02, -1, ans);
    f_ack = fidx;
    check("ACK for command 2", 32'(ans), ACK_B);
    if (ans == ACK_B) n_ack++;
    f0 = -1;
    ok = 1;
    for (int f = 0; f < sn; f++) begin
      for (int ch = 0; ch < 4; ch++) begin
        spi_xfer(8'h00, b);   got[ch][15:8] = b;
        spi_xfer(8'h00, b);   got[ch][7:0] = b;
      end
      if (f == 0)
        for (int j = 0; j < NF; j++)
          if (gen[0][j][47:32] == got[0] && gen[0][j][23:8] == got[1]) begin f0 = j; break; end
      if (f0 < 0) begin
        check("first packet frame found among ADC frames", 0, 1);
        ok = 0;
        break;
      end
      check($sformatf("s_n %0d frame %0d I2S0 left", sn, f), 32'(got[0]), 32'(gen[0][f0 + f][47:32]));
      check($sformatf("s_n %0d frame %0d I2S0 right", sn, f), 32'(got[1]), 32'(gen[0][f0 + f][23:8]));
      check($sformatf("s_n %0d frame %0d I2S1 left", sn, f), 32'(got[2]), 32'(gen[1][f0 + f][47:32]));
      check($sformatf("s_n %0d frame %0d I2S1 right", sn, f), 32'(got[3]), 32'(gen[1][f0 + f][23:8]));
      if (got[0] == gen[0][f0 + f][47:32] && got[3] == gen[1][f0 + f][23:8]) n_samples_ok += 4;
      else ok = 0;
    end
    // the packet ends there: the next byte is empty
    spi_xfer(8'h00, b);
    check("nothing after the packet", 32'(b), 0);
    // frames waiting before the command were dropped, not sent
    if (f0 >= 0) begin
      // the last captured frame was the newest one when the capture ended (a frame is
      // complete before its period ends, so the ADC may still be in that period)
      check("captured frames are recent", 32'(f_ack - f0 >= sn - 1 && f_ack - f0 <= sn + 1), 1);
    end
    if (ok) n_packets++;
  endtask

  // frames taken from I2S0 in: those beyond the streamed ones were stale and dropped
  int n_pops = 0;
  always @(posedge clk) if (rst_n && dut.u_core.req[FU_I2S_RX0].t_load &&
                            dut.u_core.req[FU_I2S_RX0].opc == PER_RECV) n_pops++;

  initial begin
    logic [7:0] ans;
    for (int a = 0; a < PLEN; a++) begin
      @(negedge clk); prog_we = 1; prog_addr = 10'(a); prog_data = prog[a];
    end
    @(negedge clk); prog_we = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    spi_cs_n[0] = 0;
    repeat (20) @(posedge clk);

    // corrupted command: the two copies differ
    command(8'h02, 8'h03, -1, ans);
    check("NACK for mismatched command copies", 32'(ans), NACK_B);
    if (ans == NACK_B) n_nack++;
    // unknown command
    command(8'h04, 8'h04, -1, ans);
    check("NACK for unknown command", 32'(ans), NACK_B);
    if (ans == NACK_B) n_nack++;
    // CONFIG: 8 frames per packet, then a short packet
    command(8'h01, 8'h01, 8, ans);
    check("ACK for command 1", 32'(ans), ACK_B);
    if (ans == ACK_B) n_cfg++;
    stream(8);
    // CONFIG back to 112 frames, the packet size of the bandwidth estimate
    command(8'h01, 8'h01, 112, ans);
    check("ACK for command 1 (112)", 32'(ans), ACK_B);
    if (ans == ACK_B) n_cfg++;
    stream(112);
    stream_mix(112);
    spi_cs_n[0] = 1;
    n_stale_dropped = n_pops - (8 + 112);

    $display("mechanisms: NACK %0d, CONFIG %0d, STREAM ACK %0d, complete packets %0d, samples %0d, stale-frame drops %0d",
             n_nack, n_cfg, n_ack, n_packets, n_samples_ok, n_stale_dropped);
    check("mechanism: NACK", 32'(n_nack), 2);
    check("mechanism: CONFIG", 32'(n_cfg), 2);
    check("mechanism: STREAM", 32'(n_ack), 2);
    check("mechanism: complete packets", 32'(n_packets), 2);
    check("mechanism: samples streamed", 32'(n_samples_ok), 4 * (8 + 112));
    check("mechanism: stale frames dropped", 32'(n_stale_dropped > 0), 1);
    $display("mechanisms: STREAM_MIX packets %0d, mixed frames %0d, saturated left mixes %0d",
             n_mix_packets, n_mixed_ok, n_saturated);
    check("mechanism: STREAM_MIX packet", 32'(n_mix_packets), 1);
    check("mechanism: mixer saturation", 32'(n_saturated > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
