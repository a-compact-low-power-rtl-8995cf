// tb_control_fsm: drives the 800 Hz sampling clock and answers the FSM's
// start strobes with model datapath blocks (fixed latencies), logs every
// strobe and compares the log with the expected schedule: EMG acquired and
// filtered on every edge; on every fourth edge also the EMG average, EEG1 and
// EEG2 (acquire, FIR, average), peak enable on the EEG2 FIR result, detection
// and output enable; window writes on every fourth frame. It also holds the
// filter busy after reset, and ends with edges too fast to serve to check
// the overrun flag.
module tb_control_fsm;
  import sleep_pkg::*;
  logic clk = 0, rst_n = 0, sample_clk = 0;
  channel_e chan;
  logic acq_start, acq_done, filt_start, filt_avg, filt_wr_win, filt_done, filt_busy;
  logic avg_valid, peak_en, det_start, det_done, out_en, overrun;
  int checks = 0, failures = 0;
  int log_q [$];
  int exp_q [$];
  int n_emg_only = 0, n_frames = 0, n_wr = 0, n_nowr = 0;

  control_fsm dut (.clk, .rst_n, .sample_clk, .chan, .acq_start, .acq_done,
    .filt_start, .filt_avg, .filt_wr_win, .filt_done, .filt_busy,
    .avg_valid, .peak_en, .det_start, .det_done, .out_en, .overrun);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- model datapath blocks ----
  initial begin
    acq_done = 0;
    forever begin
      @(posedge clk);
      if (acq_start && rst_n) begin
        log_q.push_back(100 + 10 * int'(chan));
        repeat (9) @(posedge clk);
        acq_done <= 1;
        @(posedge clk);
        acq_done <= 0;
      end
    end
  end

  initial begin
    filt_done = 0;
    filt_busy = 1;               // reset-time clear
    repeat (40) @(posedge clk);
    filt_busy <= 0;
    forever begin
      @(posedge clk);
      if (filt_start && rst_n) begin
        checks++;
        if (filt_busy) failures++;
        log_q.push_back((filt_avg ? 300 : 200) + 10 * int'(chan) + int'(filt_wr_win));
        if (filt_avg && filt_wr_win) n_wr++;
        if (filt_avg && !filt_wr_win) n_nowr++;
        filt_busy <= 1;
        repeat (filt_avg ? 30 : 20) @(posedge clk);
        filt_done <= 1; filt_busy <= 0;
        @(posedge clk);
        filt_done <= 0;
      end
    end
  end

  initial begin
    det_done = 0;
    forever begin
      @(posedge clk);
      if (det_start && rst_n) begin
        log_q.push_back(600);
        repeat (5) @(posedge clk);
        det_done <= 1;
        @(posedge clk);
        det_done <= 0;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (avg_valid) log_q.push_back(400 + 10 * int'(chan));
    if (peak_en)   log_q.push_back(500 + 10 * int'(chan));
    if (out_en)    log_q.push_back(700);
  end

  // ---- expected schedule ----
  task automatic expect_tick(int t);
    exp_q.push_back(120); exp_q.push_back(220);
    if (t % 4 == 3) begin
      int wr;
      wr = ((t / 4) % 4 == 0) ? 1 : 0;
      exp_q.push_back(320 + wr); exp_q.push_back(420);
      exp_q.push_back(100); exp_q.push_back(200); exp_q.push_back(300 + wr); exp_q.push_back(400);
      exp_q.push_back(110); exp_q.push_back(210); exp_q.push_back(510);
      exp_q.push_back(310 + wr); exp_q.push_back(410);
      exp_q.push_back(600); exp_q.push_back(700);
      n_frames++;
    end else n_emg_only++;
  endtask

  initial begin
    int nt;
    nt = 40;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < nt; t++) begin
      expect_tick(t);
      sample_clk = 1; repeat (150) @(negedge clk);
      sample_clk = 0; repeat (150) @(negedge clk);
      checks++;
      if (overrun) failures++;
    end
    repeat (300) @(negedge clk);
    checks++;
    if (log_q.size() != exp_q.size()) begin
      failures++;
      $display("log has %0d entries, expected %0d", log_q.size(), exp_q.size());
    end
    for (int i = 0; i < exp_q.size() && i < log_q.size(); i++) begin
      checks++;
      if (log_q[i] != exp_q[i]) begin
        failures++;
        if (failures < 10) $display("event %0d: %0d expected %0d", i, log_q[i], exp_q[i]);
      end
    end
    checks++;
    if (n_wr == 0 || n_nowr == 0 || n_frames == 0 || n_emg_only == 0) failures++;
    // sampling edges faster than a frame can be served
    for (int t = 0; t < 40; t++) begin
      sample_clk = 1; repeat (10) @(negedge clk);
      sample_clk = 0; repeat (10) @(negedge clk);
    end
    checks++;
    if (!overrun) begin failures++; $display("overrun not flagged"); end
    $display("EMG-only passes %0d, frames %0d, window writes %0d, skips %0d", n_emg_only, n_frames, n_wr, n_nowr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
