// full_adder: one-bit full adder, the cell of the ripple-carry blocks.
// Combinational: s = a ^ b ^ ci, co = majority(a, b, ci).
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;
  assign p  = a ^ b;
  assign s  = p ^ ci;
  assign co = (a & b) | (p & ci);
endmodule
