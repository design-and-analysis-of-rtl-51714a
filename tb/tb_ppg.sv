// tb_ppg - checks the AND-array partial product generator.
// N = 4: every operand pair; each bit pp[i][j] must be a[j]&b[i], and the
// weighted sum of all bits must be a*b. N = 8: 2000 random pairs, sum check.
module tb_ppg;
  int checks = 0, failures = 0;

  logic [3:0]           a4, b4;
  logic [3:0][3:0]      pp4;
  logic [7:0]           a8, b8;
  logic [7:0][7:0]      pp8;

  ppg #(.N(4)) dut4 (.a(a4), .b(b4), .pp(pp4));
  ppg #(.N(8)) dut8 (.a(a8), .b(b8), .pp(pp8));

  function automatic int unsigned weigh4(input logic [3:0][3:0] p);
    int unsigned s = 0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        if (p[i][j]) s += 1 << (i + j);
    return s;
  endfunction

  function automatic int unsigned weigh8(input logic [7:0][7:0] p);
    int unsigned s = 0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        if (p[i][j]) s += 1 << (i + j);
    return s;
  endfunction

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a4 = 4'(x); b4 = 4'(y);
        #1;
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++) begin
            checks++;
            if (pp4[i][j] !== ((x >> j) & (y >> i) & 1)) failures++;
          end
        checks++;
        if (weigh4(pp4) != x * y) begin
          failures++;
          $display("FAIL 4-bit %0d*%0d: partial products sum to %0d", x, y, weigh4(pp4));
        end
      end
    for (int t = 0; t < 2000; t++) begin
      a8 = 8'($urandom); b8 = 8'($urandom);
      #1;
      checks++;
      if (weigh8(pp8) != int'(a8) * int'(b8)) begin
        failures++;
        $display("FAIL 8-bit %0d*%0d: partial products sum to %0d", a8, b8, weigh8(pp8));
      end
    end
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
