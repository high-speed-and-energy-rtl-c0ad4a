// half_adder: one-bit half adder, used where a ripple-carry block has a
// carry input of zero (its least significant cell). Combinational:
// s = a ^ b, co = a & b.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule
