// 8x4 partial-product generator: the "P" tile of the Wallace tree.
//
// A tile covers eight multiplicand bits x[j+7:j] for four consecutive radix-4
// digits. For digit d and bit position b the output is
//   pp[d][b] = ((one_d & x[j+b]) | (two_d & x[j+b-1])) ^ neg_d
// an AOI22-style select of X or 2X followed by a conditional inversion. The
// bit just below the tile, x[j-1], comes in on x_below so that 2X can be
// formed inside the tile. The four rows are not shifted against each other
// here; the tree places digit d of the tile two bit positions above digit
// d-1. The tile size and the select/XOR form follow the published design;
// combinational.
module pp_gen_8x4
  import mult_pkg::*;
#(
  parameter int unsigned XW = 8,  // multiplicand bits per tile
  parameter int unsigned ND = 4   // digits per tile
) (
  input  logic [XW-1:0]         x,        // x[j+XW-1 : j]
  input  logic                  x_below,  // x[j-1], 0 for the lowest tile
  input  booth_t [ND-1:0]       dig,      // recoded digits of this tile row
  output logic [ND-1:0][XW-1:0] pp        // partial-product bits
);

  logic [XW:0] xe;  // x with the bit below attached: xe[b+1] = x[b]
  assign xe = {x, x_below};

  always_comb begin
    for (int d = 0; d < ND; d++) begin
      for (int b = 0; b < XW; b++) begin
        pp[d][b] = ((dig[d].one & xe[b+1]) | (dig[d].two & xe[b])) ^ dig[d].neg;
      end
    end
  end

endmodule
