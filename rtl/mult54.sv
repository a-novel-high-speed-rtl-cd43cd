// 54x54-bit unsigned multiplier: radix-4 Booth recoding, 4-2 compressor
// Wallace tree and a dual-rail self-timed carry-lookahead final adder.
//
// Datapath, all combinational:
//   booth_encoder  y -> 28 neg/two/one digits with unique zero
//   pp_array       x, digits -> 28 partial-product rows (8x4 "P" tiles),
//                  sign handling and correction bits folded into the rows
//   wallace_tree   28 rows -> sum and carry rows in four 4-2 levels
//   dicla          sum + carry -> product, in dual-rail with completion
// The final adder works on dual-rail codes: while eval is low its inputs are
// the spacer (all rails 0), the product reads 0 and done is low. Raising
// eval turns the two tree rows and a carry-in of 0 into valid dual-rail
// codes; done rises when every product bit and the adder's carry-out are
// valid. Lower eval again before the next operand pair (return-to-zero).
// In a zero-delay simulation done follows eval immediately; in silicon it
// marks the data-dependent completion time of the adder.
//
// x and y may change only while eval is low. RECODE selects the parallel
// recoder (default, the choice for tree multipliers) or the serial one.
// Widths are fixed by the floor plan: 54-bit operands, 108-bit product.
// The datapath blocks and their order follow the published design; the
// unsigned operand format, the eval/done interface and the absence of
// registers are this design's choices.
module mult54
  import mult_pkg::*;
#(
  parameter recode_e RECODE = RECODE_PARALLEL
) (
  input  logic [N_BITS-1:0] x,      // multiplicand
  input  logic [N_BITS-1:0] y,      // multiplier (recoded)
  input  logic              eval,   // 0: spacer / precharge, 1: evaluate
  output logic [P_BITS-1:0] p,      // product x*y (0 while eval is low)
  output logic              done    // completion of the final adder
);

  booth_t [N_DIGITS-1:0]             dig;
  logic   [N_DIGITS-1:0][P_BITS-1:0] rows;
  logic   [P_BITS-1:0]               t_sum, t_carry;
  dr_t    [P_BITS-1:0]               a_dr, b_dr, s_dr;
  dr_t                               c0_dr, cout_dr;

  booth_encoder #(.RECODE(RECODE)) u_enc (
    .y  (y),
    .dig(dig)
  );

  pp_array #(.PW(P_BITS)) u_pp (
    .x   (x),
    .dig (dig),
    .rows(rows)
  );

  wallace_tree u_tree (
    .rows (rows),
    .sum  (t_sum),
    .carry(t_carry)
  );

  always_comb begin
    for (int i = 0; i < P_BITS; i++) begin
      a_dr[i] = dr_enc(t_sum[i], eval);
      b_dr[i] = dr_enc(t_carry[i], eval);
    end
    c0_dr = dr_enc(1'b0, eval);
  end

  dicla #(.N(P_BITS)) u_add (
    .a     (a_dr),
    .b     (b_dr),
    .c0    (c0_dr),
    .s     (s_dr),
    .cout  (cout_dr),
    .finish(done)
  );

  always_comb begin
    for (int i = 0; i < P_BITS; i++) p[i] = s_dr[i].r1;
  end

endmodule
