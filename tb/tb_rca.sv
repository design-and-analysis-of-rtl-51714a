// tb_rca - checks the ripple-carry adder at its default width (9) against the
// integer sum: corner cases that ripple a carry through every bit, then random
// operands with random carry in.
module tb_rca;
  localparam int W = 9;
  int checks = 0, failures = 0;

  logic [W-1:0] x, y, sum;
  logic         cin, cout;

  rca dut (.x(x), .y(y), .cin(cin), .sum(sum), .cout(cout));

  task automatic check(input int unsigned xv, input int unsigned yv, input bit c);
    int unsigned expect_v;
    x = W'(xv); y = W'(yv); cin = c;
    #1;
    expect_v = int'(x) + int'(y) + int'(cin);
    checks++;
    if (int'({cout, sum}) != expect_v) begin
      failures++;
      $display("FAIL %0d + %0d + %0d -> %0d (expected %0d)", x, y, cin, {cout, sum}, expect_v);
    end
  endtask

  initial begin
    check(0, 0, 0);
    check(511, 1, 0);      // full carry ripple
    check(511, 0, 1);
    check(511, 511, 1);
    check(256, 256, 0);
    check(170, 85, 1);
    for (int t = 0; t < 5000; t++) check($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
