// tb_fir_avg_filter: runs the shared filter through interleaved FIR and
// averaging runs on all three channels and compares every result with an
// integer model (coefficients from the design formula, 16-bit wrapping sum,
// Q1.7 scaling with saturation, |x| windows of 512). Also checks the
// reset-time RAM clear and the run lengths (FIR 68, AVG 516 / 515 cycles).
module tb_fir_avg_filter;
  import sleep_pkg::*;
  import tb_coef_pkg::*;

  logic clk = 0, rst_n = 0, start, avg_mode, wr_win, done, busy;
  channel_e chan;
  logic signed [7:0] din;
  logic [7:0] dout;
  int checks = 0, failures = 0;
  int n_fir = 0, n_avg_wr = 0, n_avg_nowr = 0;

  fir_avg_filter dut (.clk, .rst_n, .start, .avg_mode, .chan, .wr_win, .din, .dout, .done, .busy);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist [3][64];     // hist[c][0] newest
  int win  [3][512];
  int wptr [3];
  int cf   [3][64];

  function automatic int sat8(int v);
    return v > 127 ? 127 : (v < -128 ? -128 : v);
  endfunction

  task automatic run(bit am, int c, bit wr, int x, output int got, output int cyc);
    @(negedge clk);
    start = 1; avg_mode = am; chan = channel_e'(c); wr_win = wr; din = 8'(x);
    @(negedge clk);
    start = 0; din = 8'($urandom);
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    got = am ? int'(dout) : int'($signed(dout));
  endtask

  task automatic do_fir(int c, int x);
    int got, cyc, sum, expv;
    logic signed [15:0] s16, sh;
    for (int i = 63; i > 0; i--) hist[c][i] = hist[c][i-1];
    hist[c][0] = x;
    sum = 0;
    for (int i = 0; i < 64; i++) sum += cf[c][i] * hist[c][i];
    s16 = 16'(sum);
    sh = s16 >>> 7;
    expv = sat8(int'(sh));
    run(0, c, 0, x, got, cyc);
    n_fir++;
    checks += 2;
    if (got != expv) begin
      failures++;
      $display("FIR ch%0d got %0d expected %0d", c, got, expv);
    end
    if (cyc != 68) begin
      failures++;
      $display("FIR took %0d cycles", cyc);
    end
  endtask

  task automatic do_avg(int c, bit wr, int x);
    int got, cyc, sum, expv, m;
    if (wr) begin
      m = (x < 0) ? -x : x;
      if (m > 127) m = 127;
      win[c][wptr[c]] = m;
      wptr[c] = (wptr[c] + 1) % 512;
    end
    sum = 0;
    for (int i = 0; i < 512; i++) sum += win[c][i];
    expv = int'(16'(sum)) >> 9;
    run(1, c, wr, x, got, cyc);
    if (wr) n_avg_wr++; else n_avg_nowr++;
    checks += 2;
    if (got != expv) begin
      failures++;
      $display("AVG ch%0d got %0d expected %0d", c, got, expv);
    end
    if (cyc != (wr ? 516 : 515)) begin
      failures++;
      $display("AVG took %0d cycles", cyc);
    end
  endtask

  initial begin
    int bc;
    start = 0; avg_mode = 0; chan = CH_EEG1; wr_win = 0; din = 0;
    for (int c = 0; c < 3; c++) begin
      wptr[c] = 0;
      for (int i = 0; i < 64; i++) begin hist[c][i] = 0; cf[c][i] = coef(c, i < 32 ? i : 63 - i); end
      for (int i = 0; i < 512; i++) win[c][i] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    bc = 0;
    while (busy) begin @(negedge clk); bc++; end
    checks++;
    if (bc < 500 || bc > 520) begin failures++; $display("clear took %0d cycles", bc); end
    // cleared windows average to zero
    for (int c = 0; c < 3; c++) do_avg(c, 0, 0);
    // impulse response of each channel: output follows the coefficients
    for (int c = 0; c < 3; c++) begin
      do_fir(c, 127);
      for (int k = 0; k < 70; k++) do_fir(c, 0);
    end
    // random and full-scale data, interleaved channels as in the schedule
    for (int f = 0; f < 700; f++) begin
      int ch, x;
      ch = $urandom_range(0, 2);
      x  = (f % 50 < 10) ? ((f % 2 == 1) ? 127 : -128) : $urandom_range(0, 255) - 128;
      do_fir(ch, x);
      if ($urandom_range(0, 1) == 1) do_avg(ch, $urandom_range(0, 3) != 0, x);
    end
    checks++;
    if (n_fir == 0 || n_avg_wr == 0 || n_avg_nowr == 0) failures++;
    $display("FIR runs %0d, AVG runs with write %0d, without %0d", n_fir, n_avg_wr, n_avg_nowr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
