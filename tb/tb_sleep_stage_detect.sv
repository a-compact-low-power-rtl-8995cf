// tb_sleep_stage_detect: loads random averages and thresholds, classifies and
// compares stage and ratio with the rule (EMG > Vth1 -> AWAKE, else ratio >
// Vth2 -> REM, else NREM) and integer division (0 divisor -> 255). The fast
// clock is asynchronous to the slow one; the test also checks that each
// classification completes within a bound set by the quotient.
module tb_sleep_stage_detect;
  import sleep_pkg::*;
  logic clk = 0, clk_div = 0, rst_n = 0;
  logic avg_valid, start, done, busy;
  channel_e avg_chan;
  logic [7:0] avg_value, vth_emg, vth_ratio, ratio, emg_avg;
  stage_e stage;
  int checks = 0, failures = 0;
  int n_stage [3];

  sleep_stage_detect dut (.clk, .clk_div, .rst_n, .avg_valid, .avg_chan, .avg_value,
    .start, .vth_emg, .vth_ratio, .stage, .ratio, .emg_avg, .done, .busy);

  always #294 clk = ~clk;        // ~1.7 MHz
  always #12.5 clk_div = ~clk_div; // 40 MHz

  initial begin
    #500000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(channel_e c, int v);
    @(negedge clk);
    avg_valid = 1; avg_chan = c; avg_value = 8'(v);
    @(negedge clk);
    avg_valid = 0;
  endtask

  task automatic classify(int e1, int e2, int emg, int t1, int t2);
    int q, cyc, bound;
    stage_e exp_s;
    load(CH_EEG1, e1); load(CH_EEG2, e2); load(CH_EMG, emg);
    vth_emg = 8'(t1); vth_ratio = 8'(t2);
    q = (e1 == 0) ? 255 : e2 / e1;
    exp_s = (emg > t1) ? STAGE_AWAKE : ((q > t2) ? STAGE_REM : STAGE_NREM);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    // divider cycles at 40 MHz are ~1/23.5 slow cycles, plus synchronizers
    bound = (q + 2) / 23 + 10;
    checks += 4;
    if (ratio !== 8'(q)) begin failures++; $display("ratio %0d expected %0d", ratio, q); end
    if (stage !== exp_s) begin failures++; $display("stage %0d expected %0d", stage, exp_s); end
    if (emg_avg !== 8'(emg)) failures++;
    if (cyc > bound) begin failures++; $display("classification took %0d cycles (bound %0d)", cyc, bound); end
    n_stage[exp_s]++;
  endtask

  initial begin
    avg_valid = 0; avg_chan = CH_EEG1; avg_value = 0; start = 0; vth_emg = 0; vth_ratio = 0;
    n_stage = '{0, 0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    classify(10, 50, 5, 20, 3);     // REM
    classify(10, 20, 5, 20, 3);     // NREM
    classify(10, 50, 30, 20, 3);    // AWAKE
    classify(0, 7, 0, 0, 254);      // divide by zero
    classify(1, 255, 0, 0, 100);    // longest division
    for (int k = 0; k < 400; k++)
      classify($urandom_range(0, 127), $urandom_range(0, 127), $urandom_range(0, 127),
               $urandom_range(0, 127), $urandom_range(0, 8));
    checks++;
    if (n_stage[0] == 0 || n_stage[1] == 0 || n_stage[2] == 0) failures++;
    $display("AWAKE %0d NREM %0d REM %0d", n_stage[0], n_stage[1], n_stage[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
