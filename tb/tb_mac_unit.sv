// tb_mac_unit: random sums of k products (k = 64 and 512 as in the filter,
// plus random lengths) against an integer model with 16-bit wrap-around.
module tb_mac_unit;
  logic clk = 0, rst_n = 0, clr, en;
  logic signed [7:0]  coeff, data;
  logic signed [15:0] acc;
  int checks = 0, failures = 0;

  mac_unit dut (.clk, .rst_n, .clr, .en, .coeff, .data, .acc);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_sum(int k, bit avg);
    int sum;
    sum = 0;
    for (int i = 0; i < k; i++) begin
      @(negedge clk);
      clr   = (i == 0);
      en    = 1;
      coeff = avg ? 8'sd1 : 8'($urandom_range(0, 254) - 127);
      data  = avg ? 8'($urandom_range(0, 127)) : 8'($urandom);
      sum  += int'(coeff) * int'(data);
    end
    @(negedge clk);
    en = 0; clr = 0;
    checks++;
    if (acc !== 16'(sum)) begin
      failures++;
      $display("k=%0d got %0d expected %0d", k, acc, 16'(sum));
    end
  endtask

  initial begin
    clr = 0; en = 0; coeff = 0; data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) run_sum(64, 0);
    for (int t = 0; t < 10; t++) run_sum(512, 1);
    for (int t = 0; t < 30; t++) run_sum($urandom_range(1, 100), 0);
    // idle cycles hold the sum, clr alone empties it
    @(negedge clk);
    begin
      logic signed [15:0] held;
      held = acc;
      repeat (3) @(negedge clk);
      checks++;
      if (acc !== held) failures++;
      clr = 1; @(negedge clk); clr = 0;
      checks++;
      if (acc !== 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
