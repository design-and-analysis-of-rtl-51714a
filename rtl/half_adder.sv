// half_adder - one-bit half adder (2:2 counter) of the partial product reduction.
//
// Interface: two bits of equal weight a, b; s carries the same weight, co the
// next. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule
