// full_adder - one-bit full adder (3:2 counter), the basic cell of the partial
// product reduction and of the ripple-carry adder.
//
// Interface: three bits of equal weight a, b, ci; s carries the same weight,
// co the next. Purely combinational. Standard sum/majority equations.
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
