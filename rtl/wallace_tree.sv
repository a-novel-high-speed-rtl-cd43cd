// Wallace tree of 4-2 compressors for the 28 partial products.
//
// Reduces the 28 rows of pp_array (already at their absolute weights in the
// 108-bit product frame) to a sum row and a carry row in four levels,
// grouped as in the published floor plan:
//   level 1: each group of four rows (one tile row of 8x4 generators,
//            multiplier bits Y0, Y8, ..., Y48) -> 1 pair        c42_level
//   level 2: Y0+Y8, Y16+Y24, Y32+Y40 -> 1 pair each; Y48 waits   c42_merge
//   level 3: (Y0..Y24) -> 1 pair, (Y32+Y40)+Y48 -> 1 pair        c42_merge
//   level 4: the two halves -> the final pair                    c42_merge
// Level 1 runs a chain of 8C strips over the frame. A merge compresses only
// the columns where both pairs hold bits, passes the low columns of the
// lower pair straight on (product bits that are finished early), and
// handles the columns above with an H strip that starts with one full adder.
// The column ranges follow from the row layout:
//   group g spans weights [8g-2, 8g+62] (g = 0: [0, 62]); after level 1
//   [8g-2, 8g+63]; a merge of [a0, a1] and [b0, b1] spans [a0, b1+1].
// With rows at absolute weights the 8- and 16-bit wire shifters of the
// floor plan are index offsets. Carry rows are at their own weights.
// Combinational: four compressor delays.
module wallace_tree
  import mult_pkg::*;
(
  input  logic [N_DIGITS-1:0][P_BITS-1:0] rows,
  output logic [P_BITS-1:0]               sum,
  output logic [P_BITS-1:0]               carry
);

  localparam int unsigned W  = P_BITS;
  localparam int unsigned NG = N_DIGITS / 4;  // level-1 groups (7)

  // weight range of group g after level 1
  function automatic int unsigned g_lo(int unsigned g);
    return (g == 0) ? 0 : 8 * g - 2;
  endfunction
  function automatic int unsigned g_hi(int unsigned g);
    return (8 * g + 63 > W - 1) ? W - 1 : 8 * g + 63;
  endfunction

  // level 1
  logic [NG-1:0][W-1:0] l1_s, l1_c;
  for (genvar g = 0; g < NG; g++) begin : g_l1
    c42_level #(.W(W)) u_lvl (
      .r0(rows[4*g]), .r1(rows[4*g+1]), .r2(rows[4*g+2]), .r3(rows[4*g+3]),
      .sum(l1_s[g]), .carry(l1_c[g])
    );
  end

  // level 2: pairs (0,1), (2,3), (4,5); group 6 waits for level 3
  logic [2:0][W-1:0] l2_s, l2_c;
  for (genvar q = 0; q < 3; q++) begin : g_l2
    c42_merge #(.W(W), .LO(g_lo(2*q+1)), .HI(g_hi(2*q))) u_m (
      .a_s(l1_s[2*q]),   .a_c(l1_c[2*q]),
      .b_s(l1_s[2*q+1]), .b_c(l1_c[2*q+1]),
      .sum(l2_s[q]), .carry(l2_c[q])
    );
  end

  // level 3: (Y0..Y24) spans [0, g_hi(1)+1], (Y16..Y24) starts at g_lo(2);
  //          (Y32+Y40) spans up to g_hi(5)+1, Y48 starts at g_lo(6)
  logic [1:0][W-1:0] l3_s, l3_c;
  c42_merge #(.W(W), .LO(g_lo(2)), .HI(g_hi(1) + 1)) u_l3_lo (
    .a_s(l2_s[0]), .a_c(l2_c[0]), .b_s(l2_s[1]), .b_c(l2_c[1]),
    .sum(l3_s[0]), .carry(l3_c[0])
  );
  c42_merge #(.W(W), .LO(g_lo(6)), .HI(g_hi(5) + 1)) u_l3_hi (
    .a_s(l2_s[2]), .a_c(l2_c[2]), .b_s(l1_s[6]), .b_c(l1_c[6]),
    .sum(l3_s[1]), .carry(l3_c[1])
  );

  // level 4: lower half spans [0, g_hi(3)+2], upper half starts at g_lo(4)
  c42_merge #(.W(W), .LO(g_lo(4)), .HI(g_hi(3) + 2)) u_l4 (
    .a_s(l3_s[0]), .a_c(l3_c[0]), .b_s(l3_s[1]), .b_c(l3_c[1]),
    .sum(sum), .carry(carry)
  );

endmodule
