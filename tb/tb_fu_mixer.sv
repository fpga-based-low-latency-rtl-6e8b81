// Self-checking test of the mixer FU: random gains, pan positions and samples for every
// source, RUN/RIGHT compared with a reference mix computed here (sum of sample * gain *
// pan weight, saturated to 24 bits); plus hand-worked cases: unity gain hard left and
// hard right, centre pan halving, and saturation.
module tb_fu_mixer;
  import tta_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  fu_req_t req = '0;
  logic [31:0] result;
  int checks = 0, failures = 0;
  longint g [N], p [N], s [N];

  fu_mixer #(.NUM_SRC(N)) dut (.clk, .rst_n, .req, .result);
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

  task automatic op(logic [3:0] opc, logic [31:0] o1, logic [31:0] t);
    @(negedge clk); req = '0; req.o1_load = 1; req.o1 = o1; req.t_load = 1; req.t = t; req.opc = opc;
    @(negedge clk); req = '0;
  endtask

  function automatic logic [31:0] sat(longint v);
    if (v > 8388607) v = 8388607;
    if (v < -8388608) v = -8388608;
    return 32'(v);
  endfunction

  function automatic logic [31:0] ref_mix(bit right);
    longint acc;
    acc = 0;
    for (int i = 0; i < N; i++)
      acc += s[i] * g[i] * (right ? p[i] : 256 - p[i]);
    // floor division by 2^23 (arithmetic shift)
    return sat(acc >>> 23);
  endfunction

  task automatic load_all();
    for (int i = 0; i < N; i++) begin
      op(MIX_GAIN, i, 32'(g[i]));
      op(MIX_PAN, i, 32'(p[i]));
      op(MIX_SAMPLE, i, 32'(s[i]));
    end
  endtask

  task automatic run_check(string what);
    op(MIX_RUN, 0, 0);
    check({what, " left"}, result, ref_mix(0));
    op(MIX_RIGHT, 0, 0);
    check({what, " right"}, result, ref_mix(1));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // after reset: gain 1.0, centre pan, zero samples
    op(MIX_SAMPLE, 2, 32'(1000));
    op(MIX_RUN, 0, 0);
    check("reset defaults, centre pan", result, 32'd500);
    // hard left / hard right at unity gain
    for (int i = 0; i < N; i++) begin g[i] = 32768; p[i] = 0; s[i] = 0; end
    s[0] = -123456; p[1] = 256; s[1] = 654321;
    load_all();
    run_check("hard pan");
    check("hard left value", ref_mix(0), 32'(-123456));
    // saturation
    for (int i = 0; i < N; i++) begin g[i] = 65535; p[i] = 0; s[i] = 8000000; end
    load_all();
    run_check("saturation");
    check("saturated value", ref_mix(0), 32'd8388607);
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < N; i++) begin
        g[i] = $urandom % 65536;
        p[i] = $urandom % 257;
        s[i] = longint'($signed(24'($urandom))) / ((n % 3) + 1);
      end
      load_all();
      run_check($sformatf("random %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
