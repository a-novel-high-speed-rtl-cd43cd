// Dual-rail carry-lookahead adder with completion detection.
//
// Adds two N-bit operands and a carry-in, all dual-rail, and returns the
// dual-rail sum, the dual-rail carry-out and a completion signal
//   finish = (C_N^0 + C_N^1) * prod_i (S_i^0 + S_i^1),
// which rises once every sum bit and the carry-out hold valid codes. The
// operands are padded to the next power of two NP and added by a binary tree
// of C- and D-modules (dicla_tree). The padding bits are zeros that turn
// valid together with the carry-in, so with all inputs in the spacer every
// output is in the spacer and finish is 0. Padding bit N has zero operands,
// so its sum is exactly the carry into bit N, which is used as carry-out;
// when N is a power of two a last D-module forms the carry-out from the
// whole block's status and C_0, as in the published tree.
//
// Use: hold all inputs at the spacer (00), then apply valid codes and wait
// for finish; return all inputs to the spacer before the next operation
// (four-phase, return-to-zero). The C/D equations are the published ones;
// the padding and the carry-out tap are this design's choices. Immediate
// assertions check that no input or output ever carries the illegal code 11.
// Combinational: in a zero-delay simulation finish follows the inputs at once.
module dicla
  import mult_pkg::*;
#(
  parameter int unsigned N = 108  // operand width (final adder of the 54x54 multiplier)
) (
  input  dr_t [N-1:0] a,
  input  dr_t [N-1:0] b,
  input  dr_t         c0,      // carry-in
  output dr_t [N-1:0] s,       // sum
  output dr_t         cout,    // carry-out C_N
  output logic        finish   // completion
);

  localparam int unsigned NP = (N <= 1) ? 1 : (1 << $clog2(N));

  dr_t  [NP-1:0] a_p, b_p, s_p;
  kgp_t          i_root;
  logic          pad_valid;

  // Padding zeros become valid when the carry-in does.
  assign pad_valid = c0.r0 | c0.r1;

  always_comb begin
    a_p = '0;
    b_p = '0;
    a_p[N-1:0] = a;
    b_p[N-1:0] = b;
    for (int i = N; i < NP; i++) begin
      a_p[i] = dr_enc(1'b0, pad_valid);
      b_p[i] = dr_enc(1'b0, pad_valid);
    end
  end

  dicla_tree #(.N(NP)) u_tree (
    .a    (a_p),
    .b    (b_p),
    .c_in (c0),
    .s    (s_p),
    .i_blk(i_root)
  );

  assign s = s_p[N-1:0];

  if (NP == N) begin : g_cout_d
    kgp_t i_unused;
    dicla_d u_dout (
      .i_hi (kgp_t'('0)),
      .i_lo (i_root),
      .c_k  (c0),
      .i_out(i_unused),
      .c_j  (cout)
    );
  end else begin : g_cout_pad
    assign cout = s_p[N];
  end

  // dual-rail rule: a code is never 11, on the inputs or on the outputs
  always_comb begin
    assert (!(c0.r1 && c0.r0)) else $error("dicla: carry-in is 11");
    assert (!(cout.r1 && cout.r0)) else $error("dicla: carry-out is 11");
    for (int i = 0; i < N; i++) begin
      assert (!(a[i].r1 && a[i].r0) && !(b[i].r1 && b[i].r0))
        else $error("dicla: operand bit %0d is 11", i);
      assert (!(s[i].r1 && s[i].r0)) else $error("dicla: sum bit %0d is 11", i);
    end
  end

  always_comb begin
    finish = cout.r0 | cout.r1;
    for (int i = 0; i < N; i++) finish &= s[i].r0 | s[i].r1;
  end

endmodule
