// tb_mac_dsp_top - end-to-end test of the top level at its default size (4-bit).
// Both MAC designs get the same random and corner-case operands and must each
// produce a*b + c*d one clock later; the FIR filter is driven with an impulse,
// a full-scale step and random samples and compared with a reference model.
// The run counts how often each mechanism was exercised and fails any that
// never happened: reset clearing the outputs, a MAC result using the top bit,
// both designs agreeing, the FIR delay line filling all eight taps with
// non-zero data, a run-time coefficient change and the full-scale FIR output.
module tb_mac_dsp_top;
  int checks = 0, failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]      a, b, c, d, filter_in;
  logic [7:0][3:0] coef;
  logic [8:0]      mac1_out, mac2_out;
  logic [10:0]     filter_out;

  mac_dsp_top dut (
    .clk(clk), .rst_n(rst_n),
    .a(a), .b(b), .c(c), .d(d), .mac1_out(mac1_out), .mac2_out(mac2_out),
    .filter_in(filter_in), .coef(coef), .filter_out(filter_out)
  );

  int unsigned hist [8];
  int n_reset = 0, n_topbit = 0, n_agree = 0, n_full_line = 0, n_coef_change = 0, n_fir_max = 0;

  task automatic check(input string tag, input int unsigned got, input int unsigned expect_v);
    checks++;
    if (got != expect_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d, expected %0d", tag, got, expect_v);
    end
  endtask

  task automatic step(input logic [3:0] na, nb, nc, nd, ns);
    int unsigned em, ef;
    bit full;
    @(negedge clk);
    {a, b, c, d, filter_in} = {na, nb, nc, nd, ns};
    for (int i = 7; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = ns;
    em = int'(na) * int'(nb) + int'(nc) * int'(nd);
    ef = 0;
    full = 1'b1;
    for (int i = 0; i < 8; i++) begin
      ef += int'(coef[i]) * hist[i];
      if (hist[i] == 0) full = 1'b0;
    end
    @(posedge clk);
    #1;
    check("design 1 MAC", mac1_out, em);
    check("design 2 MAC", mac2_out, em);
    check("FIR", filter_out, ef);
    if (mac1_out == mac2_out && mac1_out == em) n_agree++;
    if (mac1_out[8]) n_topbit++;
    if (full) n_full_line++;
    if (filter_out == 8 * 225) n_fir_max++;
  endtask

  initial begin
    foreach (hist[i]) hist[i] = 0;
    {a, b, c, d, filter_in} = '1;
    coef = {4'd7, 4'd7, 4'd2, 4'd2, 4'd2, 4'd2, 4'd7, 4'd7};
    repeat (2) @(posedge clk);
    #1;
    check("reset MAC1", mac1_out, 0);
    check("reset MAC2", mac2_out, 0);
    check("reset FIR", filter_out, 0);
    if (mac1_out == 0 && mac2_out == 0 && filter_out == 0) n_reset++;
    rst_n = 1'b1;

    step(4'd15, 4'd15, 4'd15, 4'd15, 4'd1);          // largest MAC result, impulse
    for (int i = 0; i < 8; i++) step(4'($urandom), 4'($urandom), 4'($urandom), 4'($urandom), 4'd0);
    for (int i = 0; i < 10; i++) step(4'($urandom), 4'($urandom), 4'($urandom), 4'($urandom), 4'hf);
    for (int i = 0; i < 300; i++) step(4'($urandom), 4'($urandom), 4'($urandom), 4'($urandom), 4'($urandom));
    for (int i = 0; i < 8; i++) coef[i] = 4'($urandom);
    n_coef_change++;
    for (int i = 0; i < 300; i++) step(4'($urandom), 4'($urandom), 4'($urandom), 4'($urandom), 4'($urandom));
    coef = '1;
    n_coef_change++;
    for (int i = 0; i < 9; i++) step(4'd15, 4'd15, 4'd15, 4'd15, 4'hf);

    @(negedge clk);
    rst_n = 1'b0;
    #1;
    check("async reset MAC1", mac1_out, 0);
    check("async reset FIR", filter_out, 0);
    if (mac1_out == 0 && filter_out == 0) n_reset++;

    $display("mechanisms: reset=%0d mac_top_bit=%0d designs_agree=%0d fir_line_full=%0d coef_change=%0d fir_full_scale=%0d",
             n_reset, n_topbit, n_agree, n_full_line, n_coef_change, n_fir_max);
    if (n_reset == 0)       failures++;
    if (n_topbit == 0)      failures++;
    if (n_agree == 0)       failures++;
    if (n_full_line == 0)   failures++;
    if (n_coef_change == 0) failures++;
    if (n_fir_max == 0)     failures++;
    checks += 6;
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
