// rca - W-bit ripple-carry adder made of a chain of full_adder cells.
//
// sum = x + y + cin (mod 2^W), cout is the carry out of bit W-1. Combinational;
// the delay grows linearly with W. It is the final carry-propagate addition of
// the MAC and the accumulation chain of the FIR filter. The default width 9 is
// the 4-bit MAC result (bits 8..0).
module rca #(
  parameter int unsigned W = 9
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] carry;
  assign carry[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a (x[i]),
      .b (y[i]),
      .ci(carry[i]),
      .s (sum[i]),
      .co(carry[i+1])
    );
  end

  assign cout = carry[W];
endmodule
