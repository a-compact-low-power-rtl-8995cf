// tb_serial_divider: random and corner-case divisions; checks the quotient
// and that a division takes quotient + 2 cycles (2 for divide by zero).
module tb_serial_divider;
  logic clk = 0, rst_n = 0, start;
  logic [7:0] num, den, quot;
  logic done, busy;
  int checks = 0, failures = 0;

  serial_divider dut (.clk, .rst_n, .start, .num, .den, .quot, .done, .busy);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic div(int n, int d);
    int cyc, eq, elat;
    @(negedge clk);
    num = 8'(n); den = 8'(d); start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    eq   = (d == 0) ? 255 : n / d;
    elat = (d == 0) ? 2 : eq + 2;
    checks++;
    if (quot !== 8'(eq)) begin
      failures++;
      $display("%0d/%0d got %0d expected %0d", n, d, quot, eq);
    end
    checks++;
    if (cyc != elat) begin
      failures++;
      $display("%0d/%0d took %0d cycles, expected %0d", n, d, cyc, elat);
    end
  endtask

  initial begin
    start = 0; num = 0; den = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    div(0, 1); div(255, 1); div(255, 255); div(7, 0); div(10, 3); div(9, 3); div(2, 200);
    for (int t = 0; t < 300; t++) div($urandom_range(0, 255), $urandom_range(0, 255));
    for (int t = 0; t < 100; t++) div($urandom_range(0, 255), $urandom_range(1, 8));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
