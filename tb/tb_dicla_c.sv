// Self-checking test of the C-module: every combination of spacer / 0 / 1
// on A, B and C. With A and B valid the status must be the one-hot
// kill/generate/propagate of the two bits; with C valid as well the sum
// must be the valid code of A^B^C; any missing input keeps the sum in the
// spacer.
module tb_dicla_c;
  import mult_pkg::*;
  dr_t a, b, c, s;
  kgp_t i_out;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  dicla_c dut (.*);

  // code: 0 = spacer, 1 = valid 0, 2 = valid 1
  function automatic dr_t mk(int code);
    dr_t d;
    d.r1 = (code == 2);
    d.r0 = (code == 1);
    return d;
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
    dr_t  es;
    for (int ca = 0; ca < 3; ca++)
      for (int cb = 0; cb < 3; cb++)
        for (int cc = 0; cc < 3; cc++) begin
          a = mk(ca); b = mk(cb); c = mk(cc);
          @(posedge clk);
          ei = '0;
          if (ca != 0 && cb != 0) begin
            if (ca == 1 && cb == 1) ei.k = 1'b1;
            else if (ca == 2 && cb == 2) ei.g = 1'b1;
            else ei.p = 1'b1;
          end
          es = '0;
          if (ca != 0 && cb != 0 && cc != 0) begin
            es.r1 = ((ca - 1) + (cb - 1) + (cc - 1)) % 2 == 1;
            es.r0 = !es.r1;
          end
          checks++;
          if (i_out !== ei || s !== es) begin
            failures++;
            $display("FAIL a=%0d b=%0d c=%0d: i=%b s=%b expected i=%b s=%b", ca, cb, cc, i_out, s, ei, es);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
