# TTA audio coprocessor for networked music performance

Musicians who play together over a network hear each other only after the audio has been
converted, moved, processed and sent. Every millisecond counts. This design is the
FPGA part of such a system. It sits between an audio board and a host computer:

- The audio board has stereo ADCs and DACs on I2S, and MIDI ports.
- The host is a small Linux computer that handles the network and talks to the FPGA over SPI.

The FPGA part is a small processor with a transport triggered architecture (TTA). Its
only instruction is "move". Every useful operation is a side effect of moving a value
into a functional unit (FU). The audio interfaces, MIDI UARTs, SPI links, a mixer and a
reverb are all FUs on the processor's buses. This lets firmware move a sample from
an I2S receiver through the mixer and reverb to an I2S transmitter in a handful of
instructions. The processor adds exactly one audio frame of latency: 256 master clocks,
or 23.3 µs at 11 MHz.

```
                 +-------------------------- audio_coprocessor_top ---------------------------+
  clk ---------->|  pll_mmcm_model --mclk (11 MHz)--> i2s_clock_gen --bclk/lrclk--> pins      |
                 |                                        | strobes, bit index               |
  prog_* ------->|  inst_mem (1024 x 128) --instr--> tta_core <--> data_mem (4096 x 32)       |
                 |                                     |                                     |
                 |     4 x 32-bit buses: RF, bool, ALU, GCU, LSU, TIMER, LED, SW,            |
                 |     I2S TX0/1, I2S RX0/1, UART TX0/1, UART RX0-3, SPI0/1, MIXER, REVERB   |
                 +--------------------------------------------------------------------------+
                    i2s_sdout/sdin[1:0]  midi_out[1:0]  midi_in[3:0]  spi_*[1:0]  led/sw[3:0]
```

All RTL is SystemVerilog-2017. It is in `rtl/`, one module or package per file. Each file
opens with a comment on its function, interface and timing, and says which parts come from
the published design and which are choices made here.

## Clocks

There are two clocks:

- **`clk`** is the system clock. The core, all FUs and both memories run on it. The
  default parameters assume 100 MHz, the oscillator of the usual Artix-7 evaluation board.
- **`mclk`** is the 11 MHz audio master clock. On the FPGA it comes from the clock
  manager (MMCM/PLL). Here it is modelled by `pll_mmcm_model`, a behavioural model with
  delays. It is also driven out to the audio board.

`i2s_clock_gen` makes the I2S bit clock and word clock. The coprocessor is the I2S master.

- The generator lives in the `clk` domain. It synchronises `mclk` and counts its rising
  edges, which makes the design free of clock-domain crossings.
- It produces the `bclk` and `lrclk` pins. It also produces single-cycle strobes
  (`bclk_rise`, `bclk_fall`) and the index of the bit now on the line. Every I2S FU uses
  these.
- One bit clock is 4 mclk. A frame is 64 bit clocks: two 32-bit slots, with `lrclk`
  high for the left slot. So one frame is 256 mclk, giving a frame rate of 11 MHz / 256
  ≈ 43 kHz.
- `clk` must be at least four times `mclk`.

## The TTA core

### Instruction format

An instruction is 128 bits: four 32-bit move slots, slot 0 in the low bits. Each slot
drives one bus. All four moves of an instruction execute in the same cycle.

| bits  | field | meaning |
|-------|-------|---------|
| 31:29 | guard | 0 always, 1 if b0, 2 if !b0, 3 if b1, 4 if !b1, 7 empty slot |
| 28:24 | dst.fu | destination unit (see the FU table) |
| 23:22 | dst.port | 0 trigger, 1 operand 1, 2 operand 2 |
| 21:18 | dst.opc | opcode started by a trigger move |
| 17    | imm | 1: the source is a sign-extended 17-bit immediate |
| 16:0  | src | immediate, or {fu[8:4], idx[3:0]} |

How the register files fit into this format:

- For the general register file (FU 0), the low four bits of the destination select one
  of 16 registers.
- The source index `idx` selects a register for reads.
- The boolean file (FU 1) has two 1-bit registers, b0 and b1, which the guards test.

Types, FU numbers and opcodes are in `rtl/tta_pkg.sv`. For test programs, `tb/tta_asm_pkg.sv`
has small helper functions (`MI`, `MS`, `D`, `I`) that build moves and instructions.

### Timing

Three rules set the timing:

- **Results.** Every FU registers its result. A value triggered in instruction *n* is
  readable as a source in instruction *n+1*, and it stays there until the unit is
  triggered again.
- **Operands.** Operand registers keep their value, so an operand moved earlier is reused
  by later triggers. An operand moved in the same instruction as the trigger is used
  directly.
- **Fetch and branches.** The global control unit (GCU) holds the program counter. The
  instruction memory has one cycle of read latency, so one instruction after a jump (the
  delay slot) still executes. A conditional branch is a guarded move into the GCU
  trigger port.

Two rules for programs:

- A program must not make two moves to the same FU port in one instruction. The
  interconnect has an assertion for this.
- The delay slot always executes, whether the branch is taken or not. Put a FIFO pop
  there only if it should happen on both paths.

### Functional units

| id | unit | operations (trigger opcode) |
|----|------|-----------------------------|
| 0 | register file, 16 x 32 | read/write per bus |
| 1 | boolean registers b0, b1 | written with bit 0 of the value |
| 2 | ALU | ADD, SUB, AND, IOR, XOR, SHL, SHR, SHRU, EQ, GT, GTU, MUL (result = o1 op t) |
| 3 | GCU | JUMP, CALL (the result is the return address) |
| 4 | LSU | LD (t = word address), ST (o1 = data, t = address) |
| 5 | timer | READ cycles since CLEAR, CLEAR |
| 6 | LED driver | WRITE pattern, READ back |
| 7 | switch driver | READ the synchronised switches |
| 8, 9 | I2S TX0, TX1 | STATUS, SEND (o1 = left, t = right) |
| 10, 11 | I2S RX0, RX1 | STATUS, RECV (left sample, pops), RIGHT (right sample of that frame) |
| 12, 13 | UART TX0, TX1 (MIDI OUT) | STATUS, SEND byte |
| 14-17 | UART RX0-3 (MIDI IN) | STATUS, RECV ({valid, byte}) |
| 18, 19 | SPI0, SPI1 slaves | STATUS, SEND byte, RECV ({valid, byte}) |
| 20 | mixer | GAIN, PAN, SAMPLE (o1 = source), RUN (left mix), RIGHT |
| 21 | reverb | WET, FB, PROCESS (t = sample, result = output) |

All peripheral FUs return the same STATUS word:

- bits 23:16 are flags, such as overrun, underrun, framing error or busy;
- bits 15:8 are the free FIFO entries;
- bits 7:0 are the used entries.

Flags that report a past event are cleared by reading STATUS.

## Audio path

**Sample format.** The audio is left-justified I2S. A 24-bit sample, MSB first, sits in
each 32-bit slot. The first bit of a slot is the MSB, with no one-bit delay, and the last
8 bits are zero.

**Receiver** (`fu_i2s_lj_rx`). It samples the data line on the bit clock's rising edge.
When the right sample is complete, it pushes the stereo frame into a 4-frame FIFO.
Inside the core, samples are signed 24-bit values sign-extended to 32 bits.

**Transmitter** (`fu_i2s_lj_tx`):

- It pulls one frame from its own 4-frame FIFO at the start of each word-clock period.
- This is the only point where samples are tied to the converter's clock. The processor
  itself runs freely at the system clock.
- If the FIFO is empty at that point, the transmitter sends silence and sets the
  underrun flag.

**Latency.** A frame that arrives in frame period *k* leaves in period *k+1*, provided
firmware moves it within one frame period. At 100 MHz that is about 23,000 cycles.

**Mixer** (`fu_mixer`). It combines `NUM_SRC` = 4 mono sources into a stereo pair.

- **Gain.** Each source has an unsigned Q1.15 gain (0x8000 = 1.0).
- **Pan.** Each source has a position from 0 (left) to 256 (right), with a linear law.
- **Run.** RUN computes both sums with 64-bit accumulation and saturates them to 24
  bits. More sources can be mixed by running the unit several times and adding the
  results in firmware.

**Reverb** (`fu_reverb`). A single feedback comb filter over a `DELAY_LEN` = 4096-sample
delay line.

- **Feedback.** Q0.15, default 0.5.
- **Dry/wet control.** `wet` runs from 0 to 256. At 0 (the default) the output is the
  input.
- **Memory.** The line is an array with asynchronous read, meant for distributed (LUT)
  RAM.
- **After reset.** The unit spends `DELAY_LEN` cycles writing zeros into the line, so that
  no random memory contents reach the output. During that time PROCESS returns the dry
  sample and leaves the line untouched. A `busy` output shows that the clearing is
  still in progress.

## MIDI and host links

**MIDI UARTs.** The UARTs run at 31250 baud with 8N1 framing: LSB first, one start bit
and one stop bit. The bit time is `CLK_HZ / MIDI_BAUD` cycles (3200 at the defaults).

- The transmitter sends queued bytes back to back, exactly 10 bit times apart.
- The receiver synchronises the line and checks the start bit half a bit after the
  falling edge. It then samples each bit in its middle and drops bytes that have a bad
  stop bit, setting the framing flag.

**SPI slaves.** Two SPI slaves connect to the host. Each uses 8-bit frames, mode 0, MSB
first.

- SCLK, CS_N and MOSI are oversampled in the `clk` domain. SCLK therefore must stay
  below about a tenth of `clk`, which is 10 MHz at the defaults.
- Each direction has a 16-byte FIFO.
- The slave loads its next transmit byte when CS_N falls and after every byte. It sends
  0 when it has nothing queued.
- The framing of audio packets and commands on this link is left to firmware.

## Memories and program loading

- `inst_mem` is 1024 x 128 bits. It has a registered read port for fetch and a write
  port (`prog_we`, `prog_addr`, `prog_data`) that loads the program while `rst_n` is low.
- `data_mem` is 4096 words of 32 bits, word addressed, with one cycle of read latency.
  It is served by the LSU.
- Both are plain arrays that synthesis maps to block RAM.

## Verification

Every block has a self-checking testbench in `tb/`. Each testbench:

- drives the block, often with `$urandom` stimulus;
- compares the outputs with a model written inside the testbench;
- has a watchdog;
- ends by printing `TB_RESULT checks=N failures=M`.

These testbenches also check rates and cycle counts, including:

- 256 mclk per frame;
- 10 bit times between UART bytes;
- the one-instruction result latency;
- the branch delay slot;
- the clock manager's period of about 90.9 ns.

`tb_tta_core` runs a hand-written program on the core alone.

`tb_audio_coprocessor_top` runs the whole design at its default parameters. It loads a
small firmware loop and surrounds the chip with models of an ADC, a DAC, a MIDI sender,
two MIDI receivers and an SPI master. It checks:

- the audio values through the mixer and reverb;
- the I2S frame rate;
- a latency of exactly one frame;
- the transmitter's underrun silence before the first frame;
- MIDI thru;
- MIDI to host over SPI;
- host to LEDs and MIDI OUT 1.

It also counts each of these events and fails if any of them never happens. It simulates
about 4 ms of operation in well under a second of run time.

`tb_host_stream` runs the host link at default parameters with a second program. It is a
small state machine in firmware:

- **WAIT_PREAMBLE.** Waits for six bytes of 0xA5 on SPI0.
- **WAIT_COMMAND.** Reads the command byte, which is sent twice. It answers NACK (0x15)
  if the two copies differ or the command is unknown.
- **CONFIG** (command 1). Reads the number of frames per packet, then answers ACK (0x06).
- **STREAM** (command 2). First it drops stale frames. Then it captures that many frames
  from both I2S inputs (four channels) into data memory, answers ACK and sends every
  sample as two bytes (bits 23:16 and 15:8).
- **STREAM_MIX** (command 3). Receives that many frames of four 16-bit sources from the
  host, one frame per audio frame period. The mixer unit mixes them, with source 0 panned
  hard left. The stereo mix plays on I2S0 out, and ACK is sent at the end.

The host model clocks dummy bytes until the answer arrives. With 112 frames, one exchange
is 8 command bytes plus 896 data bytes. The test checks every sample, that the four
channels come from the same frames, that the frames are consecutive and recent, and that
nothing follows the packet. For STREAM_MIX it compares every frame at the DAC with an
independent mix model, including saturated frames.

The byte values and the packet layout are choices made for this test. The packets carry
no MIDI data, and STREAM does not also carry audio from the host to the board.

To run any testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/tta_pkg.sv tb/tta_asm_pkg.sv tb/tb_audio_coprocessor_top.sv \
    --top-module tb_audio_coprocessor_top -Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run another one. `--timescale` is needed because the
clock manager model carries its own time unit. `-Wno-fatal` is needed because some
testbenches widen narrow values on purpose, and Verilator reports each of those as a
width warning.

## Where this design departs from, or adds to, the published one

The published design names its functional units and their basic duties, and it shows the
overall structure:

- four 32-bit buses;
- the FU set, including two I2S ports, four MIDI inputs, two MIDI outputs and two SPI
  links;
- an 11 MHz master clock;
- left-justified 24-bit samples in 32-bit slots;
- 31250-baud MIDI;
- 8-bit SPI frames.

The following were chosen here:

- **Instruction set.** The instruction encoding, opcodes and FU numbering, and the
  pipeline with a single branch delay slot.
- **Storage sizes.** The sizes of the register file (16), the boolean file (2) and the
  memories (1024 instructions, 4096 data words).
- **FIFO depths.** I2S 4 frames, UART 4 bytes, SPI 16 bytes.
- **Mixer.** The number formats and pan law, and 4 sources.
- **Reverb.** A single comb filter with a 4096-sample line.
- **Clocks.** The system clock of 100 MHz and the mclk to bclk ratio of 4.
- **SPI.** The mode and bit order, and oversampling in the system clock domain instead
  of an SCLK-clocked shifter.
- **LEDs and switches.** Four of each.
- **Second I2S output.** Both I2S ports have a transmitter and a receiver, matching the
  two-way I2S links of the system diagram, although the original audio board carries two
  stereo ADCs and only one DAC.
- **Program loading.** The program load port.

The published design also mentions the I2S buffering both as a way to avoid a master
clock and as something that works alongside the 11 MHz master clock drawn in its block
diagram. Here `mclk` is generated and brought out.

**Not included:**

- **The production firmware.** The original firmware runs the same five-state command
  loop. Its preamble and command byte values, its redundancy and ACK/NACK exchange, its
  packet layout (including MIDI messages) and its configuration variables are not
  published, so they are not reproduced. `tb_host_stream` contains a reduced command
  loop with all five states, using byte values of its own.
- **The audio board and the host computer.**

**Known limits against the published figures.** A host link at the 125 MHz SPI rate
that the published design quotes, which would carry about 166 streams, would need an
SPI slave clocked by SCLK itself. The slave here carries about 13 streams of 750 kbit/s.
