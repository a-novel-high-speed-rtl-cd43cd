// Self-checking test of the parallel neg/two/one recoder: all eight groups.
// The expected digit is -2*y[2i+1] + y[2i] + y[2i-1]; the outputs must
// encode it, crt must equal neg, and a zero digit must come out as +0.
module tb_booth_recoder_par;
  import mult_pkg::*;
  logic y_hi, y_mid, y_lo;
  booth_t dig;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  booth_recoder_par dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, mag, got;
    for (int g = 0; g < 8; g++) begin
      {y_hi, y_mid, y_lo} = 3'(g);
      @(posedge clk);
      v = -2 * int'(y_hi) + int'(y_mid) + int'(y_lo);
      mag = (v < 0) ? -v : v;
      got = (dig.two ? 2 : 0) + (dig.one ? 1 : 0);
      if (dig.neg) got = -got;
      checks++;
      if (got != v || (dig.two && dig.one)) begin
        failures++;
        $display("FAIL group %b: expected %0d got neg=%b two=%b one=%b", 3'(g), v, dig.neg, dig.two, dig.one);
      end
      checks++;
      if (dig.neg != (v < 0) || dig.crt != dig.neg || dig.two != (mag == 2) || dig.one != (mag == 1)) begin
        failures++;
        $display("FAIL group %b: flags neg=%b two=%b one=%b crt=%b", 3'(g), dig.neg, dig.two, dig.one, dig.crt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
