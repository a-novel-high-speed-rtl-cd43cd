// Serial radix-4 recoder, neg/two/one form with a unique zero.
//
// One digit of a recoding in which a carry c[i] from the digit below takes
// the place of y[2i-1]. The digit value is 2*y[2i+1] + y[2i] + c[i] - 4*c[i+1],
// drawn from {-1, 0, +1, +2}:
//   two    = ~y[2i+1] & y[2i] & c[i]  |  y[2i+1] & ~y[2i] & ~c[i]
//   one    = y[2i] ^ c[i]
//   neg    = y[2i+1] & one
//   crt    = neg
//   c[i+1] = y[2i+1] & (y[2i] | c[i])
// The carry ripples from digit to digit, hence "serial". The case 111 is the
// unique zero: neg = 0 with a carry out. Equations are the published ones;
// combinational.
module booth_recoder_ser
  import mult_pkg::*;
(
  input  logic   y_hi,   // y[2i+1]
  input  logic   y_mid,  // y[2i]
  input  logic   c_in,   // c[i], carry from the digit below (0 for digit 0)
  output booth_t dig,    // neg / two / one / crt
  output logic   c_out   // c[i+1]
);

  always_comb begin
    dig.two = (~y_hi & y_mid & c_in) | (y_hi & ~y_mid & ~c_in);
    dig.one = y_mid ^ c_in;
    dig.neg = y_hi & dig.one;
    dig.crt = dig.neg;
    c_out   = y_hi & (y_mid | c_in);
  end

endmodule
