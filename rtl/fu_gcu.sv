// Global control unit: owns the program counter and fetches instructions.
// The program counter addresses the instruction memory, which answers one cycle later,
// so an instruction executes the cycle after it is fetched. A move to the trigger port
// with opcode JUMP loads the program counter with the moved value; CALL does the same
// and also saves the return address as the unit's result. Because the next instruction
// is already being fetched when the jump executes, exactly one instruction after a jump
// (the delay slot) is still executed. A conditional branch is a guarded move to the
// trigger port. The document only names the unit; the pipeline is this design's.
module fu_gcu
  import tta_pkg::*;
#(
  parameter int unsigned PC_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  fu_req_t           req,
  output logic [PC_W-1:0]   pc,          // address being fetched
  output logic              exec_valid,  // the fetched word is valid this cycle
  output logic [DATA_W-1:0] result       // return address of the last CALL
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc         <= '0;
      exec_valid <= 1'b0;
      result     <= '0;
    end else begin
      exec_valid <= 1'b1;
      if (req.t_load && (req.opc == GCU_JUMP || req.opc == GCU_CALL)) begin
        pc <= req.t[PC_W-1:0];
        if (req.opc == GCU_CALL) result <= DATA_W'(pc + 1'b1);
      end else begin
        pc <= pc + 1'b1;
      end
    end
  end
endmodule
