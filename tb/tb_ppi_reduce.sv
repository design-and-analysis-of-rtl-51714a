// tb_ppi_reduce - checks the interlinking and reduction network.
// The partial products are formed in the testbench itself, so the network is
// tested on its own. For every instance row0 + row1 must equal a*b + c*d:
//   * N = 4, design 1 and design 2: all 65536 operand combinations;
//   * N = 8, design 1 and design 2: 20000 random combinations plus all-ones.
// It also counts the cells of the 4-bit design-1 plan: 19 full and 9 half adders
// in 4 stages, which with the 4 full adders of the final addition gives the 23
// full and 9 half adders of that design.
module tb_ppi_reduce;
  import mac_pkg::*;
  int checks = 0, failures = 0;

  logic [3:0] a4, b4, c4, d4;
  logic [7:0] a8, b8, c8, d8;
  logic [3:0][3:0] pab4, pcd4;
  logic [7:0][7:0] pab8, pcd8;
  logic [8:0]  r0_41, r1_41, r0_42, r1_42;
  logic [16:0] r0_81, r1_81, r0_82, r1_82;

  always_comb begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        pab4[i][j] = a4[j] & b4[i];
        pcd4[i][j] = c4[j] & d4[i];
      end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        pab8[i][j] = a8[j] & b8[i];
        pcd8[i][j] = c8[j] & d8[i];
      end
  end

  ppi_reduce dut41 (.pp_ab(pab4), .pp_cd(pcd4), .row0(r0_41), .row1(r1_41));
  ppi_reduce #(.N(4), .METHOD(2)) dut42 (.pp_ab(pab4), .pp_cd(pcd4), .row0(r0_42), .row1(r1_42));
  ppi_reduce #(.N(8), .METHOD(1)) dut81 (.pp_ab(pab8), .pp_cd(pcd8), .row0(r0_81), .row1(r1_81));
  ppi_reduce #(.N(8), .METHOD(2)) dut82 (.pp_ab(pab8), .pp_cd(pcd8), .row0(r0_82), .row1(r1_82));

  task automatic check(input string tag, input int unsigned got, input int unsigned expect_v);
    checks++;
    if (got != expect_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: rows sum to %0d, expected %0d", tag, got, expect_v);
    end
  endtask

  task automatic run8(input logic [7:0] a, b, c, d);
    int unsigned e;
    a8 = a; b8 = b; c8 = c; d8 = d;
    #1;
    e = int'(a) * int'(b) + int'(c) * int'(d);
    check("N=8 design 1", int'(r0_81) + int'(r1_81), e);
    check("N=8 design 2", int'(r0_82) + int'(r1_82), e);
  endtask

  initial begin
    automatic int nfa = 0, nha = 0;
    automatic int ns = sched(4, 1, 10, Q_STAGES, 0, 0);
    for (int st = 0; st < ns; st++)
      for (int c = 0; c < 10; c++) begin
        nfa += sched(4, 1, 10, Q_NFA, st, c);
        nha += sched(4, 1, 10, Q_NHA, st, c);
      end
    check("design 1 stages", ns, 4);
    check("design 1 full adders", nfa, 19);
    check("design 1 half adders", nha, 9);
    for (int v = 0; v < 65536; v++) begin
      {a4, b4, c4, d4} = 16'(v);
      #1;
      check("N=4 design 1", int'(r0_41) + int'(r1_41), int'(a4) * int'(b4) + int'(c4) * int'(d4));
      check("N=4 design 2", int'(r0_42) + int'(r1_42), int'(a4) * int'(b4) + int'(c4) * int'(d4));
    end
    run8(8'hff, 8'hff, 8'hff, 8'hff);
    for (int t = 0; t < 20000; t++) run8($urandom, $urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
