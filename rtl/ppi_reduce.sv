// ppi_reduce - partial product interlinking and reduction of A*B + C*D.
//
// The two N x N partial-product arrays are interlinked: the bits of weight 2^c of
// both products are stacked into one column c, giving column heights
// 2, 4, ..., 2N, ..., 4, 2 (for N = 4: 2, 4, 6, 8, 6, 4, 2). The columns are then
// compressed stage by stage. In a stage, a column hands groups of three bits to
// full adders and pairs to half adders and passes the rest through; sums stay in
// the column, carries move to the next column of the next stage. When no column
// holds more than two bits the two remaining rows are the outputs, and
// row0 + row1 = A*B + C*D. Adding the two products inside one tree avoids a
// separate adder after two complete multipliers.
//
// How many adders each (stage, column) gets comes from mac_pkg::sched().
// METHOD 1 at N = 4 is the 4-bit design-1 reduction: four stages with 19 full
// and 9 half adders. Columns 4..7 are then two bits high, so the final addition
// adds four full adders, 23 full and 9 half adders in all. METHOD 1 at other
// widths is Dadda-style and METHOD 2 Wallace-style (see mac_pkg). Bits inside a
// column are interchangeable, so any plan gives the same function; only the cell
// count and the depth depend on it.
//
// Combinational. Outputs are 2N+1 bits wide, enough for 2*(2^N-1)^2. Bits of
// row1 in columns that end with a single bit (for example the lowest columns)
// are constant zero.
module ppi_reduce
  import mac_pkg::*;
#(
  parameter int unsigned N      = 4,
  parameter int unsigned METHOD = 1
) (
  input  logic [N-1:0][N-1:0] pp_ab,   // pp_ab[i][j] has weight 2^(i+j)
  input  logic [N-1:0][N-1:0] pp_cd,
  output logic [2*N:0]        row0,
  output logic [2*N:0]        row1
);
  // One spare column above the result so that no carry needs special handling;
  // its bits are always zero because the sum fits in 2N+1 bits.
  localparam int WI = 2*N + 2;
  localparam int HM = 2*N;
  localparam int NS = sched(N, METHOD, WI, Q_STAGES, 0, 0);

  // Each level holds the columns of one step: col0 after interlinking, and
  // g_stage[s].nxt after compression stage s. nxt[c][k] is the k-th bit of
  // column c (zero above the column height).
  wire [HM-1:0] col0 [WI];

  // ---- interlinking: stack the bits of both products column by column ----
  for (genvar c = 0; c < WI; c++) begin : g_init
    localparam int LO  = (c > N - 1) ? c - (N - 1) : 0;   // first row with a bit here
    localparam int HI  = (c < N - 1) ? c : N - 1;         // last row
    localparam int NAB = (c <= 2*N - 2) ? HI - LO + 1 : 0;
    for (genvar k = 0; k < HM; k++) begin : g_bit
      if (k < NAB) begin : g_ab
        assign col0[c][k] = pp_ab[LO + k][c - LO - k];
      end else if (k < 2*NAB) begin : g_cd
        assign col0[c][k] = pp_cd[LO + k - NAB][c - LO - k + NAB];
      end else begin : g_zero
        assign col0[c][k] = 1'b0;
      end
    end
  end

  // ---- reduction stages ----
  for (genvar s = 0; s < NS; s++) begin : g_stage
    wire [HM-1:0] cur [WI];   // columns entering this stage
    wire [HM-1:0] nxt [WI];   // columns leaving it
    if (s == 0) begin : g_from_init
      assign cur = col0;
    end else begin : g_from_prev
      assign cur = g_stage[s-1].nxt;
    end
    for (genvar c = 0; c < WI; c++) begin : g_col
      localparam int H     = sched(N, METHOD, WI, Q_HEIGHT, s, c);
      localparam int NF    = sched(N, METHOD, WI, Q_NFA, s, c);
      localparam int NH    = sched(N, METHOD, WI, Q_NHA, s, c);
      localparam int P     = H - 3*NF - 2*NH;                 // bits passed through
      localparam int HN    = sched(N, METHOD, WI, Q_HEIGHT, s + 1, c);
      // where carries into column c+1 land in the next stage
      localparam int HUP   = (c + 1 < WI) ? sched(N, METHOD, WI, Q_HEIGHT, s, c + 1) : 0;
      localparam int NFUP  = (c + 1 < WI) ? sched(N, METHOD, WI, Q_NFA, s, c + 1) : 0;
      localparam int NHUP  = (c + 1 < WI) ? sched(N, METHOD, WI, Q_NHA, s, c + 1) : 0;
      localparam int CBASE = HUP - 2*NFUP - NHUP;              // leftovers + sums there

      // passed-through bits go first in the next stage
      for (genvar k = 0; k < P; k++) begin : g_pass
        assign nxt[c][k] = cur[c][3*NF + 2*NH + k];
      end

      for (genvar i = 0; i < NF; i++) begin : g_fa
        wire co;
        full_adder u_fa (
          .a (cur[c][3*i]),
          .b (cur[c][3*i + 1]),
          .ci(cur[c][3*i + 2]),
          .s (nxt[c][P + i]),
          .co(co)
        );
        if (c + 1 < WI) begin : g_up
          assign nxt[c+1][CBASE + i] = co;
        end
      end

      for (genvar i = 0; i < NH; i++) begin : g_ha
        wire co;
        half_adder u_ha (
          .a (cur[c][3*NF + 2*i]),
          .b (cur[c][3*NF + 2*i + 1]),
          .s (nxt[c][P + NF + i]),
          .co(co)
        );
        if (c + 1 < WI) begin : g_up
          assign nxt[c+1][CBASE + NF + i] = co;
        end
      end

      // unused positions of column c in the next stage
      for (genvar k = HN; k < HM; k++) begin : g_zero
        assign nxt[c][k] = 1'b0;
      end
    end
  end

  // ---- the two remaining rows ----
  wire [HM-1:0] fin [WI];
  if (NS == 0) begin : g_fin_init
    assign fin = col0;
  end else begin : g_fin_tree
    assign fin = g_stage[NS-1].nxt;
  end

  always_comb begin
    for (int c = 0; c <= 2*N; c++) begin
      row0[c] = fin[c][0];
      row1[c] = fin[c][1];
    end
  end

endmodule
