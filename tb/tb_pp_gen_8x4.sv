// Self-checking test of the 8x4 partial-product tile. Random multiplicand
// slices and random legal digits (+0, +-X, +-2X); the expected row is the
// 8-bit slice of X or 2X = {x, x_below} * 2 worked out arithmetically,
// inverted for a negative digit.
module tb_pp_gen_8x4;
  import mult_pkg::*;
  logic [7:0]       x;
  logic             x_below;
  booth_t [3:0]     dig;
  logic [3:0][7:0]  pp;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  pp_gen_8x4 dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned xv, m;
    logic [7:0] exp_row;
    for (int n = 0; n < 4000; n++) begin
      x = 8'($urandom);
      x_below = 1'($urandom);
      for (int d = 0; d < 4; d++) begin
        case ($urandom_range(4, 0))
          0: dig[d] = '{neg: 0, two: 0, one: 0, crt: 0};
          1: dig[d] = '{neg: 0, two: 0, one: 1, crt: 0};
          2: dig[d] = '{neg: 0, two: 1, one: 0, crt: 0};
          3: dig[d] = '{neg: 1, two: 0, one: 1, crt: 1};
          default: dig[d] = '{neg: 1, two: 1, one: 0, crt: 1};
        endcase
      end
      @(posedge clk);
      // value of the multiplicand seen from this tile, one bit below included
      xv = 2 * int'(x) + int'(x_below);
      for (int d = 0; d < 4; d++) begin
        m = dig[d].one ? xv : (dig[d].two ? 2 * xv : 0);
        exp_row = 8'(m >> 1);
        if (dig[d].neg) exp_row = ~exp_row;
        checks++;
        if (pp[d] !== exp_row) begin
          failures++;
          if (failures < 10) $display("FAIL x=%h xb=%b dig=%b: got %h expected %h", x, x_below, dig[d], pp[d], exp_row);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
