// Partial-product array of the 54x54 multiplier.
//
// Tiles 8x4 generators (pp_gen_8x4) in a grid of 7 digit groups (4 digits,
// i.e. 8 multiplier bits, each) by 7 multiplicand tiles (8 bits each, x
// zero-extended to 56 bits), and lays the 28 rows out at their absolute
// weights in a PW-bit product frame:
//  - row i sits at weight 2^(2i). Bits 0..54 are the generator outputs, bit 55
//    is the generator's bit 55, which equals the row sign S_i = neg_i; it is
//    inverted, and the constant that this inversion owes is folded into the
//    rows: row 0 carries {~S0, S0, S0} at bits 57..55, row i > 0 carries
//    ~S_i at bit 55+2i and a 1 at bit 56+2i (dropped above the frame).
//  - the correction bit crt_(i-1) of the digit below sits at weight 2^(2i-2),
//    in the two free low positions of row i. crt_27 is always 0 (the top
//    digit is never negative) and is not placed.
// The sum of the 28 rows modulo 2^PW is the product x*y. The tile size and
// the bit logic follow the published design; the sign-extension constant,
// the crt placement and the 7-tile width are this design's choices.
// Combinational.
module pp_array
  import mult_pkg::*;
#(
  parameter int unsigned PW = P_BITS
) (
  input  logic   [N_BITS-1:0]   x,
  input  booth_t [N_DIGITS-1:0] dig,
  output logic   [N_DIGITS-1:0][PW-1:0] rows
);

  localparam int unsigned NG = N_DIGITS / 4;      // digit groups (tile rows)
  localparam int unsigned NT = (N_BITS + 2) / 8;  // tiles per group: 56 bits
  localparam int unsigned RW = 8 * NT;            // 56 row bits from the tiles

  logic [RW-1:0] xe;
  assign xe = RW'(x);

  // raw[i] : the 56 generator bits of digit i
  logic [N_DIGITS-1:0][RW-1:0] raw;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    for (genvar t = 0; t < NT; t++) begin : g_tile
      logic [3:0][7:0] pp_t;
      pp_gen_8x4 #(.XW(8), .ND(4)) u_p (
        .x      (xe[8*t +: 8]),
        .x_below((t == 0) ? 1'b0 : xe[8*t-1]),
        .dig    (dig[4*g +: 4]),
        .pp     (pp_t)
      );
      for (genvar d = 0; d < 4; d++) begin : g_d
        assign raw[4*g+d][8*t +: 8] = pp_t[d];
      end
    end
  end

  always_comb begin
    rows = '0;
    for (int i = 0; i < N_DIGITS; i++) begin
      // magnitude bits (XOR neg already applied) and inverted sign
      for (int b = 0; b < RW - 1; b++) begin
        if (2*i + b < PW) rows[i][2*i+b] = raw[i][b];
      end
      if (2*i + RW - 1 < PW) rows[i][2*i+RW-1] = ~raw[i][RW-1];
      if (i == 0) begin
        rows[0][RW-1] = raw[0][RW-1];
        rows[0][RW]   = raw[0][RW-1];
        rows[0][RW+1] = ~raw[0][RW-1];
      end else begin
        if (2*i + RW < PW) rows[i][2*i+RW] = 1'b1;
        rows[i][2*i-2] = dig[i-1].crt;
      end
    end
  end

endmodule
