// fir8 - 8-tap FIR filter built from four two-product MAC units.
//
//   filter_out = sum_{i=0..7} coef[i] * x[n-i]   (unsigned)
//
// The input sample x[n] = filter_in feeds a delay line of seven registers holding
// x[n-1] .. x[n-7]. Taps are paired: MAC unit k multiplies coef[2k] by x[n-2k]
// and coef[2k+1] by x[n-2k-1] and adds the two products in its own reduction
// tree, so four MAC units cover the eight taps. Their registered results are
// summed by a chain of three ripple-carry adders, MAC 0 first, towards the output.
//
// Timing: filter_in and coef are sampled at a rising clk edge; the sum for that
// sample is on filter_out right after the same edge (the MAC result registers
// are the only pipeline stage; the adder chain that follows is combinational).
// A new sample is accepted every cycle. rst_n (asynchronous, active low) clears
// the delay line and the MAC registers.
//
// filter_out keeps full precision, 2N+3 bits; the coefficients are inputs so the
// filter response can be changed at run time. Both are this design's choices.
module fir8 #(
  parameter int unsigned N      = 4,
  parameter int unsigned METHOD = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         filter_in,
  input  logic [7:0][N-1:0]    coef,        // coef[i] multiplies x[n-i]
  output logic [2*N+2:0]       filter_out
);
  localparam int unsigned TAPS = 8;
  localparam int unsigned MW   = 2*N + 1;   // MAC result width
  localparam int unsigned OW   = 2*N + 3;   // sum of four MAC results

  logic [TAPS-1:0][N-1:0] x;                // x[i] = x[n-i]
  logic [3:0][MW-1:0]     mac;

  assign x[0] = filter_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i < TAPS; i++) x[i] <= '0;
    end else begin
      for (int i = 1; i < TAPS; i++) x[i] <= x[i-1];
    end
  end

  for (genvar k = 0; k < 4; k++) begin : g_mac
    mac_unit #(.N(N), .METHOD(METHOD)) u_mac (
      .clk    (clk),
      .rst_n  (rst_n),
      .a      (coef[2*k]),
      .b      (x[2*k]),
      .c      (coef[2*k+1]),
      .d      (x[2*k+1]),
      .mac_out(mac[k])
    );
  end

  // accumulation chain: acc[k+1] = acc[k] + mac[k+1]
  logic [3:0][OW-1:0] acc;
  logic [2:0]         cout_unused;          // the total fits in OW bits
  assign acc[0] = OW'(mac[0]);

  for (genvar k = 0; k < 3; k++) begin : g_acc
    rca #(.W(OW)) u_add (
      .x   (acc[k]),
      .y   (OW'(mac[k+1])),
      .cin (1'b0),
      .sum (acc[k+1]),
      .cout(cout_unused[k])
    );
  end

  assign filter_out = acc[3];

endmodule
