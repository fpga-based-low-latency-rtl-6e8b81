// Transport network of the TTA core: NB 32-bit buses, each driven by one move slot of
// the executing instruction, with every FU port reachable from every bus (fully
// connected). For each bus it evaluates the move's guard on the boolean registers,
// selects the source (a short immediate, sign-extended; a general register read
// through the bus's own read port; a boolean register; or an FU result) and delivers the
// value to the destination socket: an FU operand or trigger port (with the opcode), a
// general register write port or a boolean register. Purely combinational; the receiving
// units register what they get. Two buses writing the same FU port in one instruction
// is a program error and is flagged by an assertion. The bus count, width and the full
// connectivity follow the document; the encoding is this design's.
module tta_interconnect
  import tta_pkg::*;
#(
  parameter int unsigned NB = NUM_BUSES,
  parameter int unsigned NUM_BOOLS = 2
) (
  input  logic                              clk,        // for the assertion only
  input  logic                              exec_valid,
  input  move_t [NB-1:0]                    moves,
  input  logic [NUM_BOOLS-1:0]              bools,
  input  logic [NUM_FU-1:0][DATA_W-1:0]     fu_result,
  output fu_req_t [NUM_FU-1:0]              fu_req,
  // general register file
  output logic [NB-1:0][3:0]                rf_raddr,
  input  logic [NB-1:0][DATA_W-1:0]         rf_rdata,
  output logic [NB-1:0]                     rf_we,
  output logic [NB-1:0][3:0]                rf_waddr,
  output logic [NB-1:0][DATA_W-1:0]         rf_wdata,
  // boolean register file
  output logic [NB-1:0]                     bool_we,
  output logic [NB-1:0][$clog2(NUM_BOOLS)-1:0] bool_waddr,
  output logic [NB-1:0]                     bool_wdata
);
  logic [NB-1:0]             active;
  logic [NB-1:0][DATA_W-1:0] value;
  src_t [NB-1:0]             src;

  function automatic logic guard_ok(input guard_e g, input logic [NUM_BOOLS-1:0] b);
    unique case (g)
      G_ALWAYS: return 1'b1;
      G_B0:     return b[0];
      G_NB0:    return !b[0];
      G_B1:     return b[NUM_BOOLS-1];
      G_NB1:    return !b[NUM_BOOLS-1];
      default:  return 1'b0;
    endcase
  endfunction

  always_comb begin
    for (int b = 0; b < NB; b++) begin
      src[b]      = src_t'(moves[b].src);
      active[b]   = exec_valid && guard_ok(moves[b].guard, bools);
      rf_raddr[b] = src[b].idx;
      if (moves[b].imm)
        value[b] = DATA_W'($signed(moves[b].src));
      else if (src[b].fu == FU_RF)
        value[b] = rf_rdata[b];
      else if (src[b].fu == FU_BOOL)
        value[b] = DATA_W'(bools[src[b].idx[$clog2(NUM_BOOLS)-1:0]]);
      else
        value[b] = fu_result[src[b].fu];
    end
  end

  always_comb begin
    for (int f = 0; f < NUM_FU; f++) fu_req[f] = '0;
    for (int b = 0; b < NB; b++) begin
      rf_we[b]      = active[b] && moves[b].dst.fu == FU_RF;
      rf_waddr[b]   = moves[b].dst.opc;
      rf_wdata[b]   = value[b];
      bool_we[b]    = active[b] && moves[b].dst.fu == FU_BOOL;
      bool_waddr[b] = moves[b].dst.opc[$clog2(NUM_BOOLS)-1:0];
      bool_wdata[b] = value[b][0];
    end
    for (int b = 0; b < NB; b++) begin
      if (active[b] && moves[b].dst.fu != FU_RF && moves[b].dst.fu != FU_BOOL) begin
        unique case (moves[b].dst.port)
          P_TRIG: begin
            fu_req[moves[b].dst.fu].t_load = 1'b1;
            fu_req[moves[b].dst.fu].t      = value[b];
            fu_req[moves[b].dst.fu].opc    = moves[b].dst.opc;
          end
          P_OP1: begin
            fu_req[moves[b].dst.fu].o1_load = 1'b1;
            fu_req[moves[b].dst.fu].o1      = value[b];
          end
          P_OP2: begin
            fu_req[moves[b].dst.fu].o2_load = 1'b1;
            fu_req[moves[b].dst.fu].o2      = value[b];
          end
          default: ;
        endcase
      end
    end
  end

  // No FU port may be written by two buses in the same instruction.
  for (genvar i = 0; i < NB; i++) begin : g_chk_i
    for (genvar j = i + 1; j < NB; j++) begin : g_chk_j
      a_one_writer: assert property (@(posedge clk)
        !(active[i] && active[j] && moves[i].dst.fu == moves[j].dst.fu &&
          moves[i].dst.port == moves[j].dst.port &&
          moves[i].dst.fu != FU_RF && moves[i].dst.fu != FU_BOOL))
        else $error("two buses write FU %0d port %0d", moves[i].dst.fu, moves[i].dst.port);
    end
  end
endmodule
