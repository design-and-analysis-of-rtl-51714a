// tb_mac_unit - checks the registered two-product MAC, mac_out = a*b + c*d.
//   * N = 4, design 1 (defaults): every operand combination, one per clock; each
//     result must appear exactly one clock after its operands (one cycle
//     latency, one result per cycle).
//   * N = 8, design 1 and design 2: the operand sequence of a published 8-bit
//     simulation (e.g. 49*67 + 84*105 = 12103) and random operands.
//   * reset: asserting rst_n low clears every result register.
module tb_mac_unit;
  int checks = 0, failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] a4, b4, c4, d4;
  logic [8:0] out4;
  logic [7:0] a8, b8, c8, d8;
  logic [16:0] out81, out82;

  mac_unit dut4 (.clk(clk), .rst_n(rst_n), .a(a4), .b(b4), .c(c4), .d(d4), .mac_out(out4));
  mac_unit #(.N(8), .METHOD(1)) dut81 (.clk(clk), .rst_n(rst_n), .a(a8), .b(b8), .c(c8), .d(d8), .mac_out(out81));
  mac_unit #(.N(8), .METHOD(2)) dut82 (.clk(clk), .rst_n(rst_n), .a(a8), .b(b8), .c(c8), .d(d8), .mac_out(out82));

  task automatic check(input string tag, input int unsigned got, input int unsigned expect_v);
    checks++;
    if (got != expect_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d, expected %0d", tag, got, expect_v);
    end
  endtask

  // operands of the published 8-bit run: a, b, c, d and the printed result
  int unsigned fig_vec [12][5] = '{
    '{31, 40, 48, 60, 4120},  '{33, 43, 52, 65, 4799},  '{35, 46, 56, 70, 5530},
    '{37, 49, 60, 75, 6313},  '{39, 52, 64, 80, 7148},  '{41, 55, 68, 85, 8035},
    '{43, 58, 72, 90, 8974},  '{45, 61, 76, 95, 9965},  '{47, 64, 80, 100, 11008},
    '{49, 67, 84, 105, 12103}, '{51, 70, 88, 110, 13250}, '{53, 73, 92, 115, 14449}
  };

  int unsigned exp4, exp8;

  initial begin
    {a4, b4, c4, d4} = '1;
    {a8, b8, c8, d8} = '1;
    repeat (2) @(posedge clk);
    #1;
    check("reset clears N=4", out4, 0);
    check("reset clears N=8 d1", out81, 0);
    check("reset clears N=8 d2", out82, 0);
    rst_n = 1'b1;

    // exhaustive N = 4; a new operand set every cycle
    for (int v = 0; v < 65536; v++) begin
      @(negedge clk);
      {a4, b4, c4, d4} = 16'(v);
      exp4 = int'(a4) * int'(b4) + int'(c4) * int'(d4);
      // not yet visible before the edge (unless equal to the previous result)
      @(posedge clk);
      #1;
      check("N=4 one-cycle latency", out4, exp4);
    end

    // published 8-bit vectors
    foreach (fig_vec[i]) begin
      @(negedge clk);
      {a8, b8, c8, d8} = {8'(fig_vec[i][0]), 8'(fig_vec[i][1]), 8'(fig_vec[i][2]), 8'(fig_vec[i][3])};
      @(posedge clk);
      #1;
      check("N=8 d1 published", out81, fig_vec[i][4]);
      check("N=8 d2 published", out82, fig_vec[i][4]);
    end

    // random 8-bit, plus a latency check: the output holds the old value until the edge
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      exp8 = int'(out81);
      {a8, b8, c8, d8} = $urandom;
      #1;
      check("N=8 holds until clock", out81, exp8);
      exp8 = int'(a8) * int'(b8) + int'(c8) * int'(d8);
      @(posedge clk);
      #1;
      check("N=8 d1 random", out81, exp8);
      check("N=8 d2 random", out82, exp8);
    end

    // reset in the middle of operation
    @(negedge clk);
    rst_n = 1'b0;
    #1;
    check("async reset N=4", out4, 0);
    check("async reset N=8", out81, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (80000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
