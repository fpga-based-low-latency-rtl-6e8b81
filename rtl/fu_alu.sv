// Arithmetic and logic functional unit (ALU in the core's FU set).
// Operand 1 is held in a register loaded by moves to the OP1 port; a move to the
// trigger port supplies operand 2 and the opcode and starts the operation. A move to OP1
// in the same instruction as the trigger is seen by that operation. The result is
// registered: it can be read one instruction after the trigger and holds until the next
// trigger. Comparisons return 0 or 1. Shifts use the low 5 bits of operand 2.
// The document names the unit only; the operation set and encoding are this design's.
module fu_alu
  import tta_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  fu_req_t           req,
  output logic [DATA_W-1:0] result
);
  logic [DATA_W-1:0] o1_q, a, b, r;

  assign a = req.o1_load ? req.o1 : o1_q;
  assign b = req.t;

  always_comb begin
    unique case (alu_op_e'(req.opc))
      ALU_ADD:  r = a + b;
      ALU_SUB:  r = a - b;
      ALU_AND:  r = a & b;
      ALU_IOR:  r = a | b;
      ALU_XOR:  r = a ^ b;
      ALU_SHL:  r = a << b[4:0];
      ALU_SHR:  r = DATA_W'($signed(a) >>> b[4:0]);
      ALU_SHRU: r = a >> b[4:0];
      ALU_EQ:   r = DATA_W'(a == b);
      ALU_GT:   r = DATA_W'($signed(a) > $signed(b));
      ALU_GTU:  r = DATA_W'(a > b);
      ALU_MUL:  r = a * b;
      default:  r = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      o1_q   <= '0;
      result <= '0;
    end else begin
      if (req.o1_load) o1_q <= req.o1;
      if (req.t_load)  result <= r;
    end
  end
endmodule
