// Half adder: a + b = s + 2*c. Cell of the H strips of the Wallace tree.
// Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
