// Parallel radix-4 recoder, neg/two/one form with a unique zero.
//
// One digit of the recoding of multiplier bits y[2i+1], y[2i], y[2i-1]:
//   neg = y[2i+1] & ~(y[2i] & y[2i-1])
//   two = ~y[2i+1] & y[2i] & y[2i-1]  |  y[2i+1] & ~y[2i] & ~y[2i-1]
//   one = y[2i] ^ y[2i-1]
//   crt = neg
// The group 111 ("-0") gives neg = 0, so a zero digit is always +0 and its
// partial product row stays all zeros instead of all ones plus a correction
// bit. These equations and the truth table are the published recoder; the
// module is purely combinational.
module booth_recoder_par
  import mult_pkg::*;
(
  input  logic   y_hi,   // y[2i+1]
  input  logic   y_mid,  // y[2i]
  input  logic   y_lo,   // y[2i-1]
  output booth_t dig     // neg / two / one / crt
);

  always_comb begin
    dig.neg = y_hi & ~(y_mid & y_lo);
    dig.two = (~y_hi & y_mid & y_lo) | (y_hi & ~y_mid & ~y_lo);
    dig.one = y_mid ^ y_lo;
    dig.crt = dig.neg;
  end

endmodule
