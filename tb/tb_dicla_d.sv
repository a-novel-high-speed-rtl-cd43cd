// Self-checking test of the D-module: every combination of spacer or one-hot
// status on the upper and lower block and of spacer / 0 / 1 on the incoming
// carry. Expected: the joined status is the upper block's unless it
// propagates, then the lower block's; the outgoing carry is 0 on a lower
// kill, 1 on a lower generate and the incoming carry on a lower propagate.
module tb_dicla_d;
  import mult_pkg::*;
  kgp_t i_hi, i_lo, i_out;
  dr_t c_k, c_j;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  dicla_d dut (.*);

  // status code: 0 spacer, 1 kill, 2 generate, 3 propagate
  function automatic kgp_t st(int code);
    kgp_t r;
    r.k = (code == 1);
    r.g = (code == 2);
    r.p = (code == 3);
    return r;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    kgp_t ei;
    dr_t  ec;
    for (int h = 0; h < 4; h++)
      for (int l = 0; l < 4; l++)
        for (int c = 0; c < 3; c++) begin
          i_hi = st(h); i_lo = st(l);
          c_k.r1 = (c == 2); c_k.r0 = (c == 1);
          @(posedge clk);
          if (h == 3) ei = st(l);
          else ei = st(h);
          ec = '0;
          if (l == 1) ec.r0 = 1'b1;
          else if (l == 2) ec.r1 = 1'b1;
          else if (l == 3) ec = c_k;
          checks++;
          if (i_out !== ei || c_j !== ec) begin
            failures++;
            $display("FAIL hi=%0d lo=%0d c=%0d: i=%b c=%b expected %b %b", h, l, c, i_out, c_j, ei, ec);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
