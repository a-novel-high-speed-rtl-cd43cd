// C-module of the dual-rail carry-lookahead adder (one bit position i).
//
// Inputs are dual-rail operand bits A_i, B_i and the dual-rail carry C_i.
// From A_i and B_i alone it forms the one-hot carry status of the bit,
//   k = A0 B0 (kill),  g = A1 B1 (generate),  p = A0 B1 + A1 B0 (propagate),
// which goes down the lookahead tree; once C_i comes back it forms the
// dual-rail sum
//   S1 = A1 B1 C1 + A1 B0 C0 + A0 B1 C0 + A0 B0 C1,
//   S0 = A0 B0 C0 + A1 B1 C0 + A0 B1 C1 + A1 B0 C1.
// With all inputs in the spacer (00) every output is 0; each output rises
// only when the inputs it needs are valid, so the module works as
// delay-insensitive logic. The equations are the published C-module, with
// propagate taken as the exclusive case (see the design notes); combinational.
module dicla_c
  import mult_pkg::*;
(
  input  dr_t  a,
  input  dr_t  b,
  input  dr_t  c,      // carry into this bit
  output dr_t  s,      // sum bit
  output kgp_t i_out   // carry status of this bit
);

  always_comb begin
    i_out.k = a.r0 & b.r0;
    i_out.g = a.r1 & b.r1;
    i_out.p = (a.r0 & b.r1) | (a.r1 & b.r0);
    s.r1 = (a.r1 & b.r1 & c.r1) | (a.r1 & b.r0 & c.r0)
         | (a.r0 & b.r1 & c.r0) | (a.r0 & b.r0 & c.r1);
    s.r0 = (a.r0 & b.r0 & c.r0) | (a.r1 & b.r1 & c.r0)
         | (a.r0 & b.r1 & c.r1) | (a.r1 & b.r0 & c.r1);
  end

endmodule
