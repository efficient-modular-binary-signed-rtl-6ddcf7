// full_adder: one-bit full adder, a + b + c = sum + 2*carry.
// The two full adders FA1 and FA2 of the Pos-Neg adder cell are instances of it. Purely
// combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b ^ c;
  assign carry = (a & b) | (a & c) | (b & c);
endmodule
