// Self-checking test of the transport network: random instructions (four moves with
// random guards, immediates, register, boolean and FU sources, and distinct FU or
// register destinations) are applied with random FU results and register read data; the
// requests seen by every FU and the register-file write ports are compared with a
// reference decode written here. Also checks that nothing moves while exec_valid is low.
module tb_tta_interconnect;
  import tta_pkg::*;
  import tta_asm_pkg::*;
  logic clk = 0, exec_valid = 0;
  move_t [3:0] moves;
  logic [1:0] bools;
  logic [NUM_FU-1:0][31:0] fu_result;
  fu_req_t [NUM_FU-1:0] fu_req;
  logic [3:0][3:0] rf_raddr, rf_waddr;
  logic [3:0][31:0] rf_rdata, rf_wdata;
  logic [3:0] rf_we, bool_we, bool_wdata;
  logic [3:0][0:0] bool_waddr;
  int checks = 0, failures = 0;

  tta_interconnect #(.NB(4), .NUM_BOOLS(2)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  function automatic bit g_ok(guard_e g, logic [1:0] b);
    case (g)
      G_ALWAYS: return 1;
      G_B0: return b[0];
      G_NB0: return !b[0];
      G_B1: return b[1];
      G_NB1: return !b[1];
      default: return 0;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] val [4];
      bit act [4];
      int dfu [4], dport [4];
      fu_req_t exp_req [NUM_FU];
      guard_e gl [6];
      gl = '{G_ALWAYS, G_B0, G_NB0, G_B1, G_NB1, G_NEVER};
      @(negedge clk);
      exec_valid = (n % 10 != 9);
      bools = 2'($urandom);
      for (int f = 0; f < NUM_FU; f++) fu_result[f] = $urandom;
      for (int b = 0; b < 4; b++) rf_rdata[b] = $urandom;
      for (int b = 0; b < 4; b++) begin
        int kind, sfu, imm;
        dst_t d;
        // distinct destinations: bus b writes FU (4*k + b) or register file
        dfu[b] = ($urandom % 3 == 0) ? int'(FU_RF) : (2 + b + 4 * ($urandom % 5));
        dport[b] = $urandom % 3;
        d = (dfu[b] == int'(FU_RF)) ? R($urandom % 16) : D(fu_id_e'(dfu[b]), port_e'(dport[b]), 4'($urandom));
        kind = $urandom % 4;
        sfu = 2 + $urandom % 20;
        imm = int'($urandom % 131072) - 65536;
        case (kind)
          0: begin moves[b] = MI(imm, d); val[b] = 32'(imm); end
          1: begin moves[b] = MS(FU_RF, $urandom % 16, d); val[b] = rf_rdata[b]; end
          2: begin moves[b] = MS(FU_BOOL, b % 2, d); val[b] = 32'(bools[b % 2]); end
          default: begin moves[b] = MS(fu_id_e'(sfu), 0, d); val[b] = fu_result[sfu]; end
        endcase
        moves[b].guard = gl[$urandom % 6];
        act[b] = exec_valid && g_ok(moves[b].guard, bools);
      end
      for (int f = 0; f < NUM_FU; f++) exp_req[f] = '0;
      for (int b = 0; b < 4; b++) begin
        if (act[b] && dfu[b] != int'(FU_RF)) begin
          case (dport[b])
            0: begin exp_req[dfu[b]].t_load = 1; exp_req[dfu[b]].t = val[b]; exp_req[dfu[b]].opc = moves[b].dst.opc; end
            1: begin exp_req[dfu[b]].o1_load = 1; exp_req[dfu[b]].o1 = val[b]; end
            default: begin exp_req[dfu[b]].o2_load = 1; exp_req[dfu[b]].o2 = val[b]; end
          endcase
        end
      end
      #1;
      for (int f = 2; f < NUM_FU; f++) begin
        checks++;
        if (fu_req[f] !== exp_req[f]) begin
          failures++;
          $display("FAIL fu %0d request %h expected %h", f, fu_req[f], exp_req[f]);
        end
      end
      for (int b = 0; b < 4; b++) begin
        check($sformatf("rf we %0d", b), 32'(rf_we[b]), 32'(act[b] && dfu[b] == int'(FU_RF)));
        if (act[b] && dfu[b] == int'(FU_RF)) begin
          check("rf wdata", rf_wdata[b], val[b]);
          check("rf waddr", 32'(rf_waddr[b]), 32'(moves[b].dst.opc));
        end
        if (!moves[b].imm && moves[b].src[8:4] == FU_RF)
          check("rf raddr", 32'(rf_raddr[b]), 32'(moves[b].src[3:0]));
        check("bool we", 32'(bool_we[b]), 0);
      end
    end
    // a move to a boolean register
    @(negedge clk);
    exec_valid = 1;
    moves = {NOP, NOP, MI(1, B(1)), NOP};
    #1;
    check("bool write enable", 32'(bool_we), 32'b0010);
    check("bool write reg", 32'(bool_waddr[1]), 1);
    check("bool write value", 32'(bool_wdata[1]), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
