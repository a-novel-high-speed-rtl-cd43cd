// Merge of two row pairs of the Wallace tree into one pair (levels 2 to 4).
//
// The lower pair (a_s, a_c) holds bits only at weights 0..HI, the upper pair
// (b_s, b_c) only at weights LO..W-1, LO <= HI. The W-bit frame splits into
//   [0, LO)     only the lower pair: passed on unchanged; these are the low
//               product bits that leave the tree early
//   [LO, HI]    all four rows: one strip of 4-2 compressors (8C cells)
//   (HI, W)     only the upper pair: an H strip whose lowest cell is a full
//               adder taking the compressor strip's last carry
// The result is the pair (sum, carry) with carry already at its own weight;
// bits above the frame are dropped (modulo 2^W). Assertions check that the
// inputs keep to their ranges. Requires 0 < LO <= HI <= W-3. Combinational.
module c42_merge #(
  parameter int unsigned W  = 108,
  parameter int unsigned LO = 6,
  parameter int unsigned HI = 63
) (
  input  logic [W-1:0] a_s,
  input  logic [W-1:0] a_c,
  input  logic [W-1:0] b_s,
  input  logic [W-1:0] b_c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  localparam int unsigned NCMP = HI - LO + 1;  // compressor columns
  localparam int unsigned NHF  = W - 1 - HI;   // H strip columns (incl. F)

  logic [NCMP-1:0] cs, cc;
  logic            cout;

  c42_strip #(.W(NCMP)) u_8c (
    .a       (a_s[HI:LO]),
    .b       (a_c[HI:LO]),
    .c_in_row(b_s[HI:LO]),
    .d       (b_c[HI:LO]),
    .cin     (1'b0),
    .s       (cs),
    .c       (cc),
    .cout    (cout)
  );

  if (LO == 0 || LO > HI || HI + 3 > W) begin : g_bad_range
    $error("c42_merge: need 0 < LO <= HI <= W-3");
  end

  logic [NHF-1:0] hs, hc;

  hf_strip #(.NH(NHF - 1), .HAS_F(1'b1)) u_h (
    .s_row(b_s[W-1:HI+1]),
    .c_row(b_c[W-1:HI+1]),
    .cin  (cout),
    .sum  (hs),
    .carry(hc)
  );

  always_comb begin
    sum              = '0;
    carry            = '0;
    sum[LO-1:0]      = a_s[LO-1:0];
    carry[LO-1:0]    = a_c[LO-1:0];
    sum[HI:LO]       = cs;
    carry[HI+1:LO+1] = cc;
    sum[W-1:HI+1]    = hs;
    carry[W-1:HI+2]  = hc[NHF-2:0];   // the top cell's carry leaves the frame
  end

  // the two pairs must keep to their weight ranges
  always_comb begin
    assert ((a_s[W-1:HI+1] | a_c[W-1:HI+1]) == '0)
      else $error("c42_merge: lower pair has bits above weight %0d", HI);
    assert ((b_s[LO-1:0] | b_c[LO-1:0]) == '0)
      else $error("c42_merge: upper pair has bits below weight %0d", LO);
  end

endmodule
