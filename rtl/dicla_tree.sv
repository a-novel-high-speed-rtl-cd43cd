// Lookahead tree of the dual-rail carry-lookahead adder.
//
// N (a power of two) C-modules form the leaves. Above them sit log2(N)
// levels of D-modules; node m of level l joins the carry status of its two
// children at level l-1 into the status of its block of 2^l bits, and turns
// the carry into its block (from level l+1) into the carry for its upper
// child, while its lower child receives the block carry unchanged. Status
// therefore flows up the tree and carries flow back down it, as in the
// published binary tree of C- and D-modules. The carry into the whole tree is
// c_in; i_blk is the status of all N bits. Each level keeps its status and
// carry vectors in its own generate scope, so no signal depends on itself.
// Combinational.
module dicla_tree
  import mult_pkg::*;
#(
  parameter int unsigned N = 8   // bits, a power of two
) (
  input  dr_t [N-1:0] a,
  input  dr_t [N-1:0] b,
  input  dr_t         c_in,    // carry into the lowest bit
  output dr_t [N-1:0] s,
  output kgp_t        i_blk    // carry status of the whole block
);

  localparam int unsigned L = $clog2(N);

  if ((1 << L) != N) begin : g_bad_n
    $error("dicla_tree: N must be a power of two");
  end

  // st: status of each block at level l; cy: carry into each block
  for (genvar l = 0; l <= L; l++) begin : g_lvl
    kgp_t [(N >> l)-1:0] st;
    dr_t  [(N >> l)-1:0] cy;
  end

  for (genvar i = 0; i < N; i++) begin : g_leaf
    dicla_c u_c (
      .a    (a[i]),
      .b    (b[i]),
      .c    (g_lvl[0].cy[i]),
      .s    (s[i]),
      .i_out(g_lvl[0].st[i])
    );
  end

  assign g_lvl[L].cy[0] = c_in;

  for (genvar l = 1; l <= L; l++) begin : g_dlvl
    for (genvar m = 0; m < (N >> l); m++) begin : g_node
      dicla_d u_d (
        .i_hi (g_lvl[l-1].st[2*m+1]),
        .i_lo (g_lvl[l-1].st[2*m]),
        .c_k  (g_lvl[l].cy[m]),
        .i_out(g_lvl[l].st[m]),
        .c_j  (g_lvl[l-1].cy[2*m+1])
      );
      assign g_lvl[l-1].cy[2*m] = g_lvl[l].cy[m];
    end
  end

  assign i_blk = g_lvl[L].st[0];

endmodule
