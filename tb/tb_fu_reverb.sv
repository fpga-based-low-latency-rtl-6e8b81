// Self-checking test of the reverb FU with a short delay line (16 samples): a reference
// comb filter computed here (line <- x + d*fb, out = ((256-wet)*x + wet*d)/256) is
// compared sample by sample for several wet and feedback settings; also checks the
// clearing period after reset (dry output, busy high for exactly DELAY_LEN cycles) and
// that the first echo of an impulse appears DELAY_LEN samples later.
module tb_fu_reverb;
  import tta_pkg::*;
  localparam int L = 16;
  logic clk = 0, rst_n = 0, busy;
  fu_req_t req = '0;
  logic [31:0] result;
  int checks = 0, failures = 0;
  longint line [L];
  int ptr = 0;
  longint wet = 0, fb = 16384;

  fu_reverb #(.DELAY_LEN(L)) dut (.clk, .rst_n, .req, .result, .busy);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic op(logic [3:0] opc, logic [31:0] t);
    @(negedge clk); req = '0; req.t_load = 1; req.t = t; req.opc = opc;
    @(negedge clk); req = '0;
  endtask

  function automatic longint sat(longint v);
    if (v > 8388607) v = 8388607;
    if (v < -8388608) v = -8388608;
    return v;
  endfunction

  task automatic process(longint x);
    longint d, out;
    d = line[ptr];
    line[ptr] = sat(x + ((d * fb) >>> 15));
    out = sat(((256 - wet) * x + wet * d) >>> 8);
    ptr = (ptr + 1) % L;
    op(REV_PROCESS, 32'(x));
    check($sformatf("x=%0d wet=%0d fb=%0d", x, wet, fb), result, 32'(out));
  endtask

  initial begin
    int busy_cycles;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < L; i++) line[i] = 0;
    // busy for exactly L cycles after reset; a sample now passes dry
    busy_cycles = 0;
    @(negedge clk);
    check("busy after reset", 32'(busy), 32'd1);
    req.t_load = 1; req.t = 32'(777); req.opc = REV_PROCESS;
    @(negedge clk); req = '0;
    check("dry while clearing", result, 32'd777);
    busy_cycles = 2;
    while (busy) begin @(negedge clk); busy_cycles++; end
    check("clearing cycles", 32'(busy_cycles), 32'(L));
    // impulse with full wet, no feedback: echo after exactly L samples
    op(REV_WET, 256); wet = 256;
    op(REV_FB, 0); fb = 0;
    process(1000000);
    for (int i = 1; i < L; i++) process(0);
    check("impulse is next out of the line", 32'(line[ptr]), 32'd1000000);
    process(0);       // this one returns the echo
    check("echo value", result, 32'd1000000);
    // random runs with various settings
    for (int k = 0; k < 6; k++) begin
      wet = (k * 60) % 257; fb = (k * 7000) % 32768;
      op(REV_WET, 32'(wet));
      op(REV_FB, 32'(fb));
      for (int n = 0; n < 60; n++) process(longint'($signed(24'($urandom))) / 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
