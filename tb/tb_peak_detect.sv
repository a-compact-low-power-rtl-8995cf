// tb_peak_detect: random and sinusoid-like sample streams against a model of
// the local-maximum rule; checks pulse timing (cycle after en) and that no
// pulse appears without en.
module tb_peak_detect;
  logic clk = 0, rst_n = 0, en, peak;
  logic signed [7:0] x;
  int checks = 0, failures = 0, npeaks = 0;

  peak_detect dut (.clk, .rst_n, .en, .x, .peak);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m1, m2, v;
    bit exp_p;
    en = 0; x = 0; m1 = 0; m2 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      if (k < 1000) v = int'(100.0 * $sin(2.0 * 3.14159265 * k / 27.0)) + $urandom_range(0, 6) - 3;
      else          v = $urandom_range(0, 255) - 128;
      @(negedge clk);
      en = 1; x = 8'(v);
      exp_p = (m1 > m2) && (v <= m1) && (m1 > 0);
      m2 = m1; m1 = v;
      @(negedge clk);
      en = 0;
      checks++;
      if (peak !== exp_p) begin
        failures++;
        $display("sample %0d: peak %0d expected %0d", k, peak, exp_p);
      end
      if (peak) npeaks++;
      repeat ($urandom_range(0, 2)) begin
        @(negedge clk);
        checks++;
        if (peak) failures++;
      end
    end
    checks++;
    if (npeaks < 30) failures++;
    $display("peaks seen: %0d", npeaks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
