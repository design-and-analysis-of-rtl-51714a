// tb_fir8 - checks the 8-tap FIR filter against a direct-form reference model
// kept in the testbench: after every rising edge t,
//   filter_out = sum_i coef(t)[i] * in(t-i)   (samples before reset count as 0).
// Runs the default 4-bit filter and an 8-bit one side by side with the same
// stimulus (an impulse, a step of full-scale samples, a sampled sine and random
// data, with the coefficient set changed part way through), then checks reset.
module tb_fir8;
  int checks = 0, failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]      in4;
  logic [7:0][3:0] coef4;
  logic [10:0]     out4;
  logic [7:0]      in8;
  logic [7:0][7:0] coef8;
  logic [18:0]     out8;

  fir8 dut4 (.clk(clk), .rst_n(rst_n), .filter_in(in4), .coef(coef4), .filter_out(out4));
  fir8 #(.N(8), .METHOD(2)) dut8 (.clk(clk), .rst_n(rst_n), .filter_in(in8), .coef(coef8), .filter_out(out8));

  int unsigned hist4 [8];   // hist[i] = input i samples ago
  int unsigned hist8 [8];

  task automatic check(input string tag, input int unsigned got, input int unsigned expect_v);
    checks++;
    if (got != expect_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d, expected %0d", tag, got, expect_v);
    end
  endtask

  // apply one sample on the falling edge, check after the next rising edge
  task automatic step(input logic [3:0] s4, input logic [7:0] s8);
    int unsigned e4, e8;
    @(negedge clk);
    in4 = s4; in8 = s8;
    for (int i = 7; i > 0; i--) begin
      hist4[i] = hist4[i-1];
      hist8[i] = hist8[i-1];
    end
    hist4[0] = s4; hist8[0] = s8;
    e4 = 0; e8 = 0;
    for (int i = 0; i < 8; i++) begin
      e4 += int'(coef4[i]) * hist4[i];
      e8 += int'(coef8[i]) * hist8[i];
    end
    @(posedge clk);
    #1;
    check("N=4 filter", out4, e4);
    check("N=8 filter", out8, e8);
  endtask

  initial begin
    foreach (hist4[i]) begin hist4[i] = 0; hist8[i] = 0; end
    in4 = '0; in8 = '0;
    coef4 = {4'd7, 4'd7, 4'd2, 4'd2, 4'd2, 4'd2, 4'd7, 4'd7};   // symmetric low-pass style set
    for (int i = 0; i < 8; i++) coef8[i] = 8'(17 * (i + 1));
    repeat (2) @(posedge clk);
    #1;
    check("reset N=4", out4, 0);
    check("reset N=8", out8, 0);
    rst_n = 1'b1;

    // impulse: the response walks through the coefficients, one per cycle
    step(4'd1, 8'd1);
    for (int i = 0; i < 9; i++) step(4'd0, 8'd0);
    // full-scale step
    for (int i = 0; i < 10; i++) step(4'hf, 8'hff);
    // sampled sine, offset binary
    for (int i = 0; i < 64; i++)
      step(4'($rtoi(7.5 + 7.5 * $sin(6.2831853 * i / 16.0))),
           8'($rtoi(127.5 + 127.5 * $sin(6.2831853 * i / 16.0))));
    // new coefficients at run time, then random data
    for (int i = 0; i < 8; i++) begin
      coef4[i] = 4'($urandom);
      coef8[i] = 8'($urandom);
    end
    for (int i = 0; i < 500; i++) step(4'($urandom), 8'($urandom));
    // all ones everywhere: the largest output
    coef4 = '1; coef8 = '1;
    for (int i = 0; i < 9; i++) step(4'hf, 8'hff);
    check("max N=4", out4, 8 * 225);
    check("max N=8", out8, 8 * 255 * 255);

    @(negedge clk);
    rst_n = 1'b0;
    #1;
    check("async reset N=4", out4, 0);
    check("async reset N=8", out8, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
