// Self-checking test of the serial neg/two/one recoder.
// Part 1: all eight (y[2i+1], y[2i], c[i]) cases against the digit value
// 2*y[2i+1] + y[2i] + c[i] - 4*c[i+1] in {-1,0,1,2}, with a zero digit
// required to be +0. Part 2: a chain of five recoders over every 8-bit y
// (top digit sees padded zeros) must recode y exactly.
module tb_booth_recoder_ser;
  import mult_pkg::*;
  logic y_hi, y_mid, c_in, c_out;
  booth_t dig;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  booth_recoder_ser dut (.*);

  // chain of five for an 8-bit multiplier
  logic [9:0]   yc;
  booth_t [4:0] dc;
  logic [5:0]   cc;
  assign cc[0] = 1'b0;
  for (genvar i = 0; i < 5; i++) begin : g_chain
    booth_recoder_ser u (.y_hi(yc[2*i+1]), .y_mid(yc[2*i]), .c_in(cc[i]), .dig(dc[i]), .c_out(cc[i+1]));
  end

  function automatic int dval(booth_t d);
    int r;
    r = (d.two ? 2 : 0) + (d.one ? 1 : 0);
    return d.neg ? -r : r;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, cexp, v, sum;
    for (int g = 0; g < 8; g++) begin
      {y_hi, y_mid, c_in} = 3'(g);
      @(posedge clk);
      s = 2 * int'(y_hi) + int'(y_mid) + int'(c_in);
      cexp = (s >= 3) ? 1 : 0;
      v = s - 4 * cexp;
      checks++;
      if (int'(c_out) != cexp || dval(dig) != v || (dig.two && dig.one)) begin
        failures++;
        $display("FAIL case %b: expected %0d/c%0d got neg=%b two=%b one=%b c=%b", 3'(g), v, cexp, dig.neg, dig.two, dig.one, c_out);
      end
      checks++;
      if (dig.crt != dig.neg || (v == 0 && dig.neg)) begin
        failures++;
        $display("FAIL case %b: crt/unique zero", 3'(g));
      end
    end
    for (int y = 0; y < 256; y++) begin
      yc = 10'(y);
      @(posedge clk);
      sum = 0;
      for (int i = 0; i < 5; i++) sum += dval(dc[i]) * (1 << (2 * i));
      checks++;
      if (sum != y || cc[5]) begin
        failures++;
        $display("FAIL chain y=%0d recoded to %0d", y, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
