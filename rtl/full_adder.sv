// Full adder: a + b + ci = s + 2*co. The single F cell that takes the
// compressor chain's carry into an H strip of the Wallace tree.
// Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (ci & (a ^ b));
endmodule
