// Self-checking test of the dual-rail carry-lookahead adder at its default
// width (108 bits, tree padded to 128) and at 8 bits (a power of two, carry
// out from the last D-module). For each random operand pair (plus all-ones
// and carry chains) it checks: in the spacer every output is 00 and finish
// is low; with one operand bit still in the spacer finish stays low; with
// all inputs valid the sum and carry-out are the valid codes of a+b+cin and
// finish is high.
module tb_dicla;
  import mult_pkg::*;
  localparam int N = 108;
  localparam int M = 8;

  dr_t [N-1:0] a, b, s;
  dr_t         c0, cout;
  logic        finish;
  dr_t [M-1:0] a8, b8, s8;
  dr_t         c08, cout8;
  logic        finish8;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  dicla dut (.a(a), .b(b), .c0(c0), .s(s), .cout(cout), .finish(finish));
  dicla #(.N(M)) dut8 (.a(a8), .b(b8), .c0(c08), .s(s8), .cout(cout8), .finish(finish8));

  function automatic dr_t enc(logic v, logic valid);
    dr_t d;
    d.r1 = valid & v;
    d.r0 = valid & ~v;
    return d;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] av, bv;
    logic         cv;
    logic [N:0]   r;
    logic [M-1:0] a8v, b8v;
    logic [M:0]   r8;
    logic         ok;
    int           pos;
    for (int n = 0; n < 1500; n++) begin
      for (int k = 0; k < N; k += 32) begin
        av[k +: 32] = $urandom;
        bv[k +: 32] = $urandom;
      end
      cv = 1'($urandom);
      if (n == 0) begin av = '1; bv = '0; cv = 1'b1; end   // full carry chain
      if (n == 1) begin av = '1; bv = '1; cv = 1'b1; end
      if (n == 2) begin av = '0; bv = '0; cv = 1'b0; end
      a8v = 8'($urandom); b8v = 8'($urandom);
      // spacer phase
      for (int i = 0; i < N; i++) begin a[i] = '0; b[i] = '0; end
      c0 = '0;
      for (int i = 0; i < M; i++) begin a8[i] = '0; b8[i] = '0; end
      c08 = '0;
      @(posedge clk);
      ok = !finish && !finish8 && cout == '0 && cout8 == '0;
      for (int i = 0; i < N; i++) if (s[i] != '0) ok = 0;
      check(ok, "spacer not all zero");
      // all but one operand bit valid
      pos = $urandom_range(N - 1, 0);
      for (int i = 0; i < N; i++) begin
        a[i] = enc(av[i], 1'b1);
        b[i] = enc(bv[i], i != pos);
      end
      c0 = enc(cv, 1'b1);
      @(posedge clk);
      check(!finish && s[pos] == '0, $sformatf("finish early with bit %0d missing", pos));
      // evaluate
      b[pos] = enc(bv[pos], 1'b1);
      for (int i = 0; i < M; i++) begin
        a8[i] = enc(a8v[i], 1'b1);
        b8[i] = enc(b8v[i], 1'b1);
      end
      c08 = enc(cv, 1'b1);
      @(posedge clk);
      r = {1'b0, av} + {1'b0, bv} + (N+1)'(cv);
      ok = finish && cout == enc(r[N], 1'b1);
      for (int i = 0; i < N; i++) if (s[i] != enc(r[i], 1'b1)) ok = 0;
      check(ok, $sformatf("sum n=%0d", n));
      r8 = {1'b0, a8v} + {1'b0, b8v} + 9'(cv);
      ok = finish8 && cout8 == enc(r8[M], 1'b1);
      for (int i = 0; i < M; i++) if (s8[i] != enc(r8[i], 1'b1)) ok = 0;
      check(ok, $sformatf("8-bit sum %h+%h+%b", a8v, b8v, cv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
