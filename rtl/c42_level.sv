// One 4-to-2 reduction step of the Wallace tree over a W-bit frame.
//
// Four rows at the same weights are compressed by a chain of 8C strips
// (c42_strip, eight 4-2 compressors each) to a sum row and a carry row; the
// carry row is moved one bit to the left. Strip k handles bits 8k..8k+7 and
// takes its cin from strip k-1. Bits above the frame are dropped, so the
// result is exact modulo 2^W. Where fewer than four of the rows hold bits the
// compressors see zero inputs and act as half or full adders. The 8C strips
// follow the published floor plan's first level; running them over the
// whole frame is this design's choice. Combinational.
module c42_level #(
  parameter int unsigned W = 108
) (
  input  logic [W-1:0] r0,
  input  logic [W-1:0] r1,
  input  logic [W-1:0] r2,
  input  logic [W-1:0] r3,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry   // already aligned (shifted left by one)
);

  localparam int unsigned NS = (W + 7) / 8;
  localparam int unsigned WP = 8 * NS;

  logic [WP-1:0] a, b, c, d, s, cy;
  logic [NS:0]   chain;

  assign a = WP'(r0);
  assign b = WP'(r1);
  assign c = WP'(r2);
  assign d = WP'(r3);
  assign chain[0] = 1'b0;

  for (genvar k = 0; k < NS; k++) begin : g_strip
    c42_strip #(.W(8)) u_8c (
      .a       (a[8*k +: 8]),
      .b       (b[8*k +: 8]),
      .c_in_row(c[8*k +: 8]),
      .d       (d[8*k +: 8]),
      .cin     (chain[k]),
      .s       (s[8*k +: 8]),
      .c       (cy[8*k +: 8]),
      .cout    (chain[k+1])
    );
  end

  assign sum   = s[W-1:0];
  assign carry = {cy[W-2:0], 1'b0};

endmodule
