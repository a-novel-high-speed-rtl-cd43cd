// 4-2 compressor cell.
//
// Adds four bits of one weight and a carry-in from the cell one weight below:
//   i1 + i2 + i3 + i4 + cin = x + 2*(y + co)
// It is built as the published gate diagram: a 4-input XOR of i1..i4 selects
// both output multiplexers. The carry output y is the AND-OR term
// (i1&i2 | i3&i4) when the XOR is 0 and cin when it is 1; the sum x is cin
// when the XOR is 0 and ~cin when it is 1. The carry to the next weight,
// co = (i1|i2) & (i3|i4) (OR-AND), does not depend on cin, so the cin->co
// chain of a row of cells never ripples. co_n is its complement, as the cell
// drives both. The transistor-level cell (dynamic pass-transistor logic) is
// represented by its logic function; combinational.
module compressor42 (
  input  logic i1,
  input  logic i2,
  input  logic i3,
  input  logic i4,
  input  logic cin,   // co of the cell one weight below
  output logic x,     // sum, weight 2^k
  output logic y,     // carry, weight 2^(k+1)
  output logic co,    // carry to the next cell, weight 2^(k+1)
  output logic co_n   // complement of co
);

  logic xor4, and_or, or_and;

  always_comb begin
    xor4   = i1 ^ i2 ^ i3 ^ i4;
    and_or = (i1 & i2) | (i3 & i4);
    or_and = (i1 | i2) & (i3 | i4);
    y      = xor4 ? cin : and_or;
    x      = xor4 ? ~cin : cin;
    co     = or_and;
    co_n   = ~or_and;
  end

endmodule
