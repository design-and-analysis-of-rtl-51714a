// mac_dsp_top - the two proposed MAC designs and the FIR filter built from them.
//
// Three independent datapaths share one clock and reset:
//   * u_mac1: design 1 MAC (fewest adders), mac1_out = a*b + c*d.
//   * u_mac2: design 2 MAC (Wallace-style reduction), mac2_out = a*b + c*d, fed
//     with the same operands so both designs can be compared cycle by cycle.
//   * u_fir : 8-tap FIR filter made of four design-1 MAC units.
// All operands are unsigned and N bits wide (4 by default). The MAC outputs follow
// their operands by one clock; filter_out follows filter_in by one clock.
// rst_n is asynchronous and active low. The two MAC designs and the filter are
// evaluated separately in the original work; placing them side by side, with
// shared MAC operands, is this design's choice.
module mac_dsp_top #(
  parameter int unsigned N = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // two-product MAC operands (shared by both designs)
  input  logic [N-1:0]      a,
  input  logic [N-1:0]      b,
  input  logic [N-1:0]      c,
  input  logic [N-1:0]      d,
  output logic [2*N:0]      mac1_out,
  output logic [2*N:0]      mac2_out,
  // FIR filter
  input  logic [N-1:0]      filter_in,
  input  logic [7:0][N-1:0] coef,
  output logic [2*N+2:0]    filter_out
);
  mac_unit #(.N(N), .METHOD(1)) u_mac1 (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .c(c), .d(d), .mac_out(mac1_out)
  );

  mac_unit #(.N(N), .METHOD(2)) u_mac2 (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .c(c), .d(d), .mac_out(mac2_out)
  );

  fir8 #(.N(N), .METHOD(1)) u_fir (
    .clk(clk), .rst_n(rst_n), .filter_in(filter_in), .coef(coef), .filter_out(filter_out)
  );
endmodule
