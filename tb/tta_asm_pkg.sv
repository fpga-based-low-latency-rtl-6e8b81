// Helpers for testbenches that program the TTA core: they build move slots and
// instructions in the encoding defined by tta_pkg, so a test program reads as a list of
// moves ("value -> FU.port.opcode") instead of raw bit patterns.
package tta_asm_pkg;
  import tta_pkg::*;

  localparam move_t NOP = '{guard: G_NEVER, dst: '0, imm: 1'b0, src: '0};

  function automatic dst_t D(fu_id_e fu, port_e p, logic [3:0] opc = 4'd0);
    return '{fu: fu, port: p, opc: opc};
  endfunction

  // Destination: general register r / boolean register r.
  function automatic dst_t R(int r);
    return '{fu: FU_RF, port: 2'd0, opc: 4'(r)};
  endfunction
  function automatic dst_t B(int r);
    return '{fu: FU_BOOL, port: 2'd0, opc: 4'(r)};
  endfunction

  // Move an immediate (sign-extended from 17 bits).
  function automatic move_t MI(int imm, dst_t d, guard_e g = G_ALWAYS);
    return '{guard: g, dst: d, imm: 1'b1, src: IMM_W'(imm)};
  endfunction

  // Move an FU result (fu) or a register (fu = FU_RF / FU_BOOL, idx = register).
  function automatic move_t MS(fu_id_e fu, int idx, dst_t d, guard_e g = G_ALWAYS);
    src_t s;
    s = '{unused: '0, fu: fu, idx: 4'(idx)};
    return '{guard: g, dst: d, imm: 1'b0, src: IMM_W'(s)};
  endfunction

  function automatic logic [INSTR_W-1:0] I(move_t m0, move_t m1 = NOP, move_t m2 = NOP,
                                           move_t m3 = NOP);
    return {m3, m2, m1, m0};
  endfunction
endpackage
