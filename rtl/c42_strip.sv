// Strip of 4-2 compressors: the "8C" tile of the Wallace tree.
//
// W compressor42 cells side by side, cell k taking bit k of the four input
// rows. The co of cell k feeds the cin of cell k+1; cin of cell 0 comes from
// the strip to the right and co of the top cell leaves on cout. Because a
// cell's co does not depend on its cin, the chain is one cell deep whatever W
// is. Outputs: the sum row s (weight of the inputs) and the carry row c, to
// be placed one bit to the left by the user. W = 8 is the published tile;
// combinational.
module c42_strip #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c_in_row,
  input  logic [W-1:0] d,
  input  logic         cin,    // co from the strip to the right
  output logic [W-1:0] s,      // sum row
  output logic [W-1:0] c,      // carry row, weight one above s
  output logic         cout    // co of the top cell
);

  logic [W:0] chain;
  assign chain[0] = cin;

  for (genvar k = 0; k < W; k++) begin : g_cell
    logic co_n_unused;
    compressor42 u_c42 (
      .i1  (a[k]),
      .i2  (b[k]),
      .i3  (c_in_row[k]),
      .i4  (d[k]),
      .cin (chain[k]),
      .x   (s[k]),
      .y   (c[k]),
      .co  (chain[k+1]),
      .co_n(co_n_unused)
    );
  end

  assign cout = chain[W];

endmodule
