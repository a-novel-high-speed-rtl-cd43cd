// Half-adder strip of the Wallace tree ("6H", "15H", "21H+1F").
//
// Covers the columns above a 4-2 compressor strip where only the upper of the
// two row pairs being merged holds bits. With HAS_F = 1 the lowest column is
// a full adder that also takes cin, the carry out of the compressor strip
// just below; every other column is a half adder of its two bits. Each cell
// puts its sum in the sum row at its own weight and its carry in the carry
// row one weight up. No carry travels from cell to cell, so the strip is one
// cell deep. Bit k of s_row/c_row/sum is at the strip's weight k; carry bit k
// is at weight k+1. The published floor plan gives the strip kinds and
// sizes; which columns they take follows from the partial-product layout of
// this design. Combinational.
module hf_strip #(
  parameter int unsigned NH    = 21,  // half adders
  parameter bit          HAS_F = 1'b1 // one full adder below them
) (
  input  logic [NH+HAS_F-1:0] s_row,
  input  logic [NH+HAS_F-1:0] c_row,
  input  logic                cin,    // used only when HAS_F = 1
  output logic [NH+HAS_F-1:0] sum,
  output logic [NH+HAS_F-1:0] carry   // weight one above sum
);

  localparam int unsigned NC = NH + HAS_F;

  for (genvar k = 0; k < NC; k++) begin : g_cell
    if (HAS_F && k == 0) begin : g_f
      full_adder u_fa (.a(s_row[k]), .b(c_row[k]), .ci(cin), .s(sum[k]), .co(carry[k]));
    end else begin : g_h
      half_adder u_ha (.a(s_row[k]), .b(c_row[k]), .s(sum[k]), .c(carry[k]));
    end
  end

  if (!HAS_F) begin : g_no_f
    logic cin_unused;
    assign cin_unused = cin;
  end

endmodule
