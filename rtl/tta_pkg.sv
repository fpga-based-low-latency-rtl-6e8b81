// Shared types and constants of the TTA audio coprocessor.
//
// The core moves 32-bit words over four transport buses. Each instruction holds one
// move slot per bus; a move copies a source (an FU result, a register or a short
// immediate) into a destination socket (an FU operand or trigger port, or a register).
// A move into an FU trigger port starts the operation named by the opcode carried in the
// destination field; every FU registers its result, so the result is readable by the
// next instruction (latency 1).
//
// The bus count and width follow the design description. The instruction encoding,
// the FU numbering and the opcode values are this design's own choices.
package tta_pkg;

  localparam int unsigned DATA_W    = 32;
  localparam int unsigned NUM_BUSES = 4;
  localparam int unsigned SAMPLE_W  = 24;   // audio samples inside the processor
  localparam int unsigned IMM_W     = 17;   // short immediate per move slot
  localparam int unsigned FU_ID_W   = 5;
  localparam int unsigned NUM_FU    = 32;

  // Guard field of a move slot: the move takes effect only when the guard holds.
  typedef enum logic [2:0] {
    G_ALWAYS = 3'd0,
    G_B0     = 3'd1,   // bool register 0 is 1
    G_NB0    = 3'd2,   // bool register 0 is 0
    G_B1     = 3'd3,
    G_NB1    = 3'd4,
    G_NEVER  = 3'd7    // empty slot (no move)
  } guard_e;

  // Functional unit numbers (destination and source address spaces share them).
  typedef enum logic [FU_ID_W-1:0] {
    FU_RF      = 5'd0,
    FU_BOOL    = 5'd1,
    FU_ALU     = 5'd2,
    FU_GCU     = 5'd3,
    FU_LSU     = 5'd4,
    FU_TIMER   = 5'd5,
    FU_LED     = 5'd6,
    FU_SW      = 5'd7,
    FU_I2S_TX0 = 5'd8,
    FU_I2S_TX1 = 5'd9,
    FU_I2S_RX0 = 5'd10,
    FU_I2S_RX1 = 5'd11,
    FU_UART_TX0 = 5'd12,
    FU_UART_TX1 = 5'd13,
    FU_UART_RX0 = 5'd14,
    FU_UART_RX1 = 5'd15,
    FU_UART_RX2 = 5'd16,
    FU_UART_RX3 = 5'd17,
    FU_SPI0    = 5'd18,
    FU_SPI1    = 5'd19,
    FU_MIXER   = 5'd20,
    FU_REVERB  = 5'd21
  } fu_id_e;

  // Ports of an FU as destination sockets.
  typedef enum logic [1:0] {
    P_TRIG = 2'd0,   // trigger: starts the operation
    P_OP1  = 2'd1,   // operand 1
    P_OP2  = 2'd2    // operand 2
  } port_e;

  // Destination field: {fu, port, opc}. For the register files the low 4 bits
  // ({port, opc} collapsed to opc) select the register.
  typedef struct packed {
    logic [FU_ID_W-1:0] fu;
    logic [1:0]         port;
    logic [3:0]         opc;
  } dst_t;

  // Source field (when imm == 0): {fu, idx}; idx selects a register for the
  // register files and is ignored for other FUs (they have one result port).
  typedef struct packed {
    logic [IMM_W-FU_ID_W-4-1:0] unused;
    logic [FU_ID_W-1:0]        fu;
    logic [3:0]                idx;
  } src_t;

  typedef struct packed {
    guard_e           guard;
    dst_t             dst;
    logic             imm;
    logic [IMM_W-1:0] src;   // src_t, or a signed immediate when imm == 1
  } move_t;

  localparam int unsigned INSTR_W = NUM_BUSES * $bits(move_t);

  // Request from the interconnect to one FU for one cycle.
  typedef struct packed {
    logic              t_load;
    logic              o1_load;
    logic              o2_load;
    logic [3:0]        opc;
    logic [DATA_W-1:0] t;
    logic [DATA_W-1:0] o1;
    logic [DATA_W-1:0] o2;
  } fu_req_t;

  // Opcodes.
  typedef enum logic [3:0] {
    ALU_ADD = 4'd0, ALU_SUB = 4'd1, ALU_AND = 4'd2, ALU_IOR = 4'd3,
    ALU_XOR = 4'd4, ALU_SHL = 4'd5, ALU_SHR = 4'd6, ALU_SHRU = 4'd7,
    ALU_EQ  = 4'd8, ALU_GT  = 4'd9, ALU_GTU = 4'd10, ALU_MUL = 4'd11
  } alu_op_e;

  localparam logic [3:0] GCU_JUMP = 4'd0;   // t = target
  localparam logic [3:0] GCU_CALL = 4'd1;   // t = target, result = return address

  localparam logic [3:0] LSU_LD = 4'd0;     // t = word address, result = data
  localparam logic [3:0] LSU_ST = 4'd1;     // o1 = data, t = word address

  localparam logic [3:0] TMR_READ  = 4'd0;  // result = cycles since last clear
  localparam logic [3:0] TMR_CLEAR = 4'd1;

  localparam logic [3:0] IO_WRITE = 4'd0;   // LED driver: t = LED pattern
  localparam logic [3:0] IO_READ  = 4'd1;   // LED / switch drivers: result = state

  // Peripheral FUs (I2S, UART, SPI) share these.
  localparam logic [3:0] PER_STATUS = 4'd0; // result = {8'0, flags, free, count}
  localparam logic [3:0] PER_SEND   = 4'd1; // push t (I2S TX: o1 = left, t = right)
  localparam logic [3:0] PER_RECV   = 4'd2; // pop; UART/SPI: bit 8 = valid, I2S RX: left sample
  localparam logic [3:0] PER_RIGHT  = 4'd3; // I2S RX: right sample of last popped frame

  localparam logic [3:0] MIX_GAIN   = 4'd0; // o1 = source, t = gain (Q1.15)
  localparam logic [3:0] MIX_PAN    = 4'd1; // o1 = source, t = pan 0..256 (0 = left)
  localparam logic [3:0] MIX_SAMPLE = 4'd2; // o1 = source, t = sample
  localparam logic [3:0] MIX_RUN    = 4'd3; // result = left mix, right mix kept
  localparam logic [3:0] MIX_RIGHT  = 4'd4; // result = right mix of last run

  localparam logic [3:0] REV_WET     = 4'd0; // t = wet amount 0..256
  localparam logic [3:0] REV_FB      = 4'd1; // t = feedback (Q0.15)
  localparam logic [3:0] REV_PROCESS = 4'd2; // t = sample, result = output sample

  // Saturate a wide signed value to SAMPLE_W bits, sign-extended to 32.
  function automatic logic [DATA_W-1:0] sat_sample(input logic signed [63:0] v);
    localparam logic signed [63:0] MAXV = (64'sd1 <<< (SAMPLE_W-1)) - 1;
    localparam logic signed [63:0] MINV = -(64'sd1 <<< (SAMPLE_W-1));
    logic signed [63:0] c;
    c = (v > MAXV) ? MAXV : (v < MINV) ? MINV : v;
    return c[DATA_W-1:0];
  endfunction

endpackage
