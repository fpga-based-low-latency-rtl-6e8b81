// End-to-end test of the audio coprocessor at its default parameters (100 MHz system
// clock, 11 MHz master clock from the clock manager model, 31250 baud MIDI, 4096-sample
// reverb line). A small firmware loop is loaded into the instruction memory; it
//   A) takes stereo frames from I2S0 in, mixes them (source 0 hard left, source 1 hard
//      right, unity gain), passes the left channel through the reverb at wet = 128 and
//      sends the frame to I2S0 out;
//   B) forwards every MIDI byte from MIDI IN 0 to MIDI OUT 0 and to the host over SPI0;
//   C) shows every byte from the host (SPI0) on the LEDs and forwards it to MIDI OUT 1.
// Around it the test models a left-justified ADC and DAC on I2S0, a MIDI sender and two
// MIDI receivers, and the SPI master. It checks the audio values (left = input/2 once
// the reverb line is cleared, right = input), the I2S frame rate (256 mclk per frame),
// the audio latency through the processor (exactly one frame), the transmitter's
// silence before the first frame (FIFO underrun), the MIDI and SPI data, and counts how
// often each of these mechanisms happened.
module tb_audio_coprocessor_top;
  import tta_pkg::*;
  import tta_asm_pkg::*;
  localparam int BIT = 100_000_000 / 31_250;   // MIDI bit time in system clock cycles
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

  // ---------------- firmware ----------------
  localparam int SEC_B = 15, SEC_C = 21, LOOP = 3;
  logic [127:0] prog [32];
  initial begin
    for (int a = 0; a < 32; a++) prog[a] = I(NOP);
    prog[0]  = I(MI(0, D(FU_MIXER, P_OP1)), MI(0, D(FU_MIXER, P_TRIG, MIX_PAN)));
    prog[1]  = I(MI(1, D(FU_MIXER, P_OP1)), MI(256, D(FU_MIXER, P_TRIG, MIX_PAN)));
    prog[2]  = I(MI(128, D(FU_REVERB, P_TRIG, REV_WET)));
    // A: audio
    prog[3]  = I(MI(0, D(FU_I2S_RX0, P_TRIG, PER_STATUS)));
    prog[4]  = I(MS(FU_I2S_RX0, 0, D(FU_ALU, P_OP1)), MI(24, D(FU_ALU, P_TRIG, ALU_SHL)));
    prog[5]  = I(MS(FU_ALU, 0, D(FU_ALU, P_OP1)), MI(0, D(FU_ALU, P_TRIG, ALU_GTU)));
    prog[6]  = I(MS(FU_ALU, 0, B(0)));
    prog[7]  = I(MI(SEC_B, D(FU_GCU, P_TRIG, GCU_JUMP), G_NB0));
    prog[8]  = I(NOP);                                         // delay slot
    prog[9]  = I(MI(0, D(FU_I2S_RX0, P_TRIG, PER_RECV)));
    prog[10] = I(MI(0, D(FU_MIXER, P_OP1)), MS(FU_I2S_RX0, 0, D(FU_MIXER, P_TRIG, MIX_SAMPLE)),
                 MI(0, D(FU_I2S_RX0, P_TRIG, PER_RIGHT)));
    prog[11] = I(MI(1, D(FU_MIXER, P_OP1)), MS(FU_I2S_RX0, 0, D(FU_MIXER, P_TRIG, MIX_SAMPLE)));
    prog[12] = I(MI(0, D(FU_MIXER, P_TRIG, MIX_RUN)));
    prog[13] = I(MS(FU_MIXER, 0, D(FU_REVERB, P_TRIG, REV_PROCESS)),
                 MI(0, D(FU_MIXER, P_TRIG, MIX_RIGHT)));
    prog[14] = I(MS(FU_REVERB, 0, D(FU_I2S_TX0, P_OP1)), MS(FU_MIXER, 0, D(FU_I2S_TX0, P_TRIG, PER_SEND)));
    // B: MIDI in 0 -> MIDI out 0 and SPI0
    prog[15] = I(MI(0, D(FU_UART_RX0, P_TRIG, PER_RECV)));
    prog[16] = I(MS(FU_UART_RX0, 0, R(1)), MS(FU_UART_RX0, 0, D(FU_ALU, P_OP1)),
                 MI(8, D(FU_ALU, P_TRIG, ALU_SHRU)));
    prog[17] = I(MS(FU_ALU, 0, B(0)));
    prog[18] = I(MI(SEC_C, D(FU_GCU, P_TRIG, GCU_JUMP), G_NB0));
    prog[19] = I(NOP);
    prog[20] = I(MS(FU_RF, 1, D(FU_UART_TX0, P_TRIG, PER_SEND)), MS(FU_RF, 1, D(FU_SPI0, P_TRIG, PER_SEND)));
    // C: SPI0 -> LEDs and MIDI out 1
    prog[21] = I(MI(0, D(FU_SPI0, P_TRIG, PER_RECV)));
    prog[22] = I(MS(FU_SPI0, 0, R(2)), MS(FU_SPI0, 0, D(FU_ALU, P_OP1)), MI(8, D(FU_ALU, P_TRIG, ALU_SHRU)));
    prog[23] = I(MS(FU_ALU, 0, B(0)));
    prog[24] = I(MI(LOOP, D(FU_GCU, P_TRIG, GCU_JUMP), G_NB0));
    prog[25] = I(NOP);
    prog[26] = I(MS(FU_RF, 2, D(FU_LED, P_TRIG, IO_WRITE)), MS(FU_RF, 2, D(FU_UART_TX1, P_TRIG, PER_SEND)));
    prog[27] = I(MI(LOOP, D(FU_GCU, P_TRIG, GCU_JUMP)));
  end

  // ---------------- mechanism counters ----------------
  int n_frames_ok = 0, n_silent = 0, n_midi_thru = 0, n_midi_to_host = 0, n_host_to_led = 0;
  int n_branch_taken = 0, n_branch_not = 0, n_dry_pass = 0;

  always @(posedge clk) if (rst_n && dut.u_core.u_gcu.req.t_load) begin
    // a guarded jump reached the GCU: taken
    n_branch_taken++;
  end
  always @(posedge clk) if (rst_n && dut.u_core.exec_valid &&
                            dut.u_core.moves[0].dst.fu == FU_GCU &&
                            !dut.u_core.u_gcu.req.t_load) n_branch_not++;

  // ---------------- ADC model on I2S0 in ----------------
  logic [47:0] gen [256];
  int fidx = -1, abit = 0;
  logic aprev = 0;
  initial for (int i = 0; i < 256; i++) gen[i] = {24'($urandom), 24'($urandom)};
  always @(negedge bclk) begin
    if (lrclk != aprev) begin
      abit = 0;
      if (lrclk) fidx++;
    end
    aprev = lrclk;
    i2s_sdin[0] = (fidx >= 0 && abit < 24) ? (lrclk ? gen[fidx][47 - abit] : gen[fidx][23 - abit]) : 1'b0;
    abit++;
  end

  // ---------------- DAC model on I2S0 out ----------------
  logic [47:0] dac_frames [$];
  int dac_start_fidx [$];
  logic [23:0] dl, dcur;
  logic dprev = 0;
  int dbit = 0, start_f = 0;
  always @(posedge bclk) begin
    if (lrclk != dprev) begin
      if (!lrclk) dl = dcur;
      else begin
        if (dbit >= 32) begin
          dac_frames.push_back({dl, dcur});
          dac_start_fidx.push_back(start_f);
        end
        start_f = fidx;
      end
      dbit = 0;
      dcur = '0;
    end
    if (dbit < 24) dcur = {dcur[22:0], i2s_sdout[0]};
    dbit++;
    dprev = lrclk;
  end

  // frame rate: 256 mclk periods per lrclk period
  int mclk_count = 0, lr_periods = 0;
  always @(posedge mclk) mclk_count++;
  initial begin
    int m0;
    @(posedge lrclk);
    @(posedge lrclk);
    m0 = mclk_count;
    repeat (4) @(posedge lrclk);
    check("mclk periods per frame", 32'(mclk_count - m0), 32'(4 * 256));
  end

  // ---------------- MIDI ----------------
  task automatic midi_send(int port, logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      midi_in[port] = f[i];
      repeat (BIT) @(posedge clk);
    end
  endtask

  logic [7:0] midi_rx0 [$], midi_rx1 [$];
  for (genvar p = 0; p < 2; p++) begin : g_midi_dec
    initial begin
      forever begin
        logic [7:0] b;
        @(negedge midi_out[p]);
        repeat (BIT / 2) @(negedge clk);
        for (int i = 0; i < 8; i++) begin
          repeat (BIT) @(negedge clk);
          b[i] = midi_out[p];
        end
        repeat (BIT) @(negedge clk);
        if (p == 0) midi_rx0.push_back(b); else midi_rx1.push_back(b);
      end
    end
  end

  // ---------------- SPI master on SPI0 ----------------
  task automatic spi_xfer(input logic [7:0] out, output logic [7:0] in);
    for (int i = 7; i >= 0; i--) begin
      spi_mosi[0] = out[i];
      repeat (10) @(posedge clk);
      spi_sclk[0] = 1; in[i] = spi_miso[0];
      repeat (10) @(posedge clk);
      spi_sclk[0] = 0;
    end
  endtask

  initial begin
    logic [7:0] r0, r1;
    int first;
    for (int a = 0; a < 32; a++) begin
      @(negedge clk); prog_we = 1; prog_addr = 10'(a); prog_data = prog[a];
    end
    @(negedge clk); prog_we = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;

    // MIDI in 0: a note-on status and a note number
    midi_send(0, 8'h90);
    midi_send(0, 8'h3C);
    repeat (12 * BIT) @(posedge clk);
    check("midi thru count", 32'(midi_rx0.size()), 2);
    if (midi_rx0.size() == 2) begin
      check("midi thru byte 0", 32'(midi_rx0[0]), 32'h90);
      check("midi thru byte 1", 32'(midi_rx0[1]), 32'h3C);
      n_midi_thru += 2;
    end

    // host reads the forwarded MIDI bytes and sends two bytes of its own
    spi_cs_n[0] = 0;
    repeat (20) @(posedge clk);
    spi_xfer(8'h05, r0);
    spi_xfer(8'h0A, r1);
    repeat (20) @(posedge clk);
    spi_cs_n[0] = 1;
    check("host gets MIDI byte 0", 32'(r0), 32'h90);
    check("host gets MIDI byte 1", 32'(r1), 32'h3C);
    if (r0 == 8'h90 && r1 == 8'h3C) n_midi_to_host += 2;
    repeat (200) @(posedge clk);
    check("leds show last host byte", 32'(led), 32'hA);
    repeat (24 * BIT) @(posedge clk);
    check("host bytes on MIDI out 1", 32'(midi_rx1.size()), 2);
    if (midi_rx1.size() == 2) begin
      check("midi out 1 byte 0", 32'(midi_rx1[0]), 32'h05);
      check("midi out 1 byte 1", 32'(midi_rx1[1]), 32'h0A);
      n_host_to_led += 2;
    end

    // ---------------- audio ----------------
    first = -1;
    foreach (dac_frames[i]) begin
      if (first < 0 && dac_frames[i] != 0) first = i;
      if (first < 0) n_silent++;
    end
    check("audio frames came out", 32'(first >= 0), 1);
    check("enough frames", 32'(dac_frames.size() > 40), 1);
    for (int k = first; k < dac_frames.size(); k++) begin
      int j;
      logic [23:0] el, er, l_in;
      j = k - first;             // input frame number
      l_in = gen[j][47:24];
      er = gen[j][23:0];
      el = 24'($signed(l_in) >>> 1);
      if (dac_frames[k][47:24] == l_in && dac_frames[k][23:0] == er) begin
        n_dry_pass++;            // reverb still clearing its line: dry
        checks++;
        if (dut.u_core.u_reverb.DELAY_LEN * 10 < (j + 1) * 2400) begin
          failures++; $display("FAIL frame %0d dry long after reset", j);
        end
      end else begin
        check($sformatf("left frame %0d", j), 32'(dac_frames[k][47:24]), 32'(el));
        check($sformatf("right frame %0d", j), 32'(dac_frames[k][23:0]), 32'(er));
        if (dac_frames[k][47:24] == el && dac_frames[k][23:0] == er) n_frames_ok++;
      end
      check($sformatf("latency of frame %0d in frames", j), 32'(dac_start_fidx[k] - j), 1);
    end

    $display("mechanisms: frames processed %0d, dry frames while reverb line clears %0d, silent frames before first (underrun) %0d",
             n_frames_ok, n_dry_pass, n_silent);
    $display("mechanisms: MIDI thru %0d, MIDI to host %0d, host to LED/MIDI %0d, jumps %0d, jumps not taken %0d",
             n_midi_thru, n_midi_to_host, n_host_to_led, n_branch_taken, n_branch_not);
    check("mechanism: frames processed", 32'(n_frames_ok > 30), 1);
    check("mechanism: underrun silence", 32'(n_silent > 0), 1);
    check("mechanism: midi thru", 32'(n_midi_thru), 2);
    check("mechanism: midi to host", 32'(n_midi_to_host), 2);
    check("mechanism: host to leds", 32'(n_host_to_led), 2);
    check("mechanism: jumps taken", 32'(n_branch_taken > 0), 1);
    check("mechanism: guarded jumps not taken", 32'(n_branch_not > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
