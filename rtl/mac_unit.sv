// mac_unit - two-product multiply-accumulate unit: mac_out = a*b + c*d.
//
// Four unsigned N-bit operands enter two AND-array partial product generators;
// the interlinking and reduction network compresses both products together into
// two rows, a ripple-carry adder adds those rows, and the (2N+1)-bit sum is stored
// in the result register. The product sum is accumulated inside the reduction tree
// rather than by an adder placed after two finished multipliers.
//
// METHOD selects the reduction plan of the two proposed designs: 1 (fewest
// adders, the default) or 2 (more adders, Wallace-style); see ppi_reduce.
//
// Timing: operands applied before a rising clk edge appear on mac_out after that
// edge (one cycle latency, one result per cycle). rst_n is an asynchronous,
// active-low reset that clears the result register; the reset polarity and the
// asynchronous style are this design's choice.
module mac_unit #(
  parameter int unsigned N      = 4,
  parameter int unsigned METHOD = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  input  logic [N-1:0] d,
  output logic [2*N:0] mac_out
);
  logic [N-1:0][N-1:0] pp_ab, pp_cd;
  logic [2*N:0]        row0, row1, sum;
  logic                cout_unused;

  ppg #(.N(N)) u_ppg_ab (.a(a), .b(b), .pp(pp_ab));
  ppg #(.N(N)) u_ppg_cd (.a(c), .b(d), .pp(pp_cd));

  ppi_reduce #(.N(N), .METHOD(METHOD)) u_reduce (
    .pp_ab(pp_ab),
    .pp_cd(pp_cd),
    .row0 (row0),
    .row1 (row1)
  );

  // The sum never exceeds 2*(2^N-1)^2 < 2^(2N+1), so the carry out is always 0.
  rca #(.W(2*N + 1)) u_add (
    .x   (row0),
    .y   (row1),
    .cin (1'b0),
    .sum (sum),
    .cout(cout_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mac_out <= '0;
    else        mac_out <= sum;
  end

endmodule
