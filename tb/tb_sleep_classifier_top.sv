// tb_sleep_classifier_top: end-to-end test of the classifier at its default
// parameters, with the clocks of the reference system (1.7 MHz filter clock,
// 40 MHz divider clock, 800 Hz sampling clock).
// A behavioural front end serves synthetic signals: a 2 Hz cortex EEG, a 7 Hz
// hippocampus EEG and a 150 Hz EMG whose amplitudes change every SEG frames,
// with a small deterministic noise term. An integer model of the whole
// algorithm (FIR from the coefficient formula, |x| windows written every 4th
// frame, ratio by integer division, thresholds, local-maximum peaks) predicts
// every frame; each stage_valid is checked for stage, ratio and EMG average,
// and the peak pulses are counted against the model. The thresholds are
// changed between segments so that AWAKE, NREM and REM all occur. The latency
// from the sampling edge that completes a frame to stage_valid is measured and
// checked against a bound. At the end, sampling edges that come too fast must
// raise overrun. Each mechanism is counted and must occur at least once.
module tb_sleep_classifier_top;
  import tb_model_pkg::*;

  localparam int NFRAMES = 160;
  localparam int SEG     = 40;
  localparam int LAT_MAX = 1900;   // cycles, sampling edge to stage_valid

  logic clk = 0, clk_div = 0, rst_n = 0, sample_clk = 0;
  logic [2:0] ser_in;
  logic [7:0] vth_emg, vth_ratio;
  logic [1:0] ser_chan, sleep_stage;
  logic ser_load, ser_shift, stage_valid, peak, overrun;
  logic [7:0] eeg_ratio, emg_avg;
  logic [7:0] sample [3];
  int loads [3];
  int checks = 0, failures = 0;

  sleep_classifier_top dut (.clk, .clk_div, .rst_n, .sample_clk, .ser_in, .vth_emg, .vth_ratio,
    .ser_chan, .ser_load, .ser_shift, .sleep_stage, .stage_valid, .peak, .eeg_ratio, .emg_avg, .overrun);

  frontend_model fe (.clk, .ser_chan, .ser_load, .ser_shift, .sample, .ser_out(ser_in), .loads);

  always #294 clk = ~clk;          // 1.70 MHz
  always #12.5 clk_div = ~clk_div; // 40 MHz

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  function automatic int amp(int c, int seg);
    // rows: segment 0..3; columns EEG1, EEG2, EMG
    int t [4][3] = '{'{100, 30, 20}, '{30, 110, 10}, '{60, 60, 120}, '{20, 120, 60}};
    return t[seg % 4][c];
  endfunction

  function automatic int gen(int c, int k);
    real f, fs, ph;
    int frame, v, nz;
    fs    = (c == 2) ? 800.0 : 200.0;
    f     = (c == 0) ? 2.0 : ((c == 1) ? 7.0 : 150.0);
    frame = (c == 2) ? k / 4 : k;
    ph    = 2.0 * 3.14159265358979 * f * real'(k) / fs;
    nz    = int'((32'(k) * 32'd1103515245 + 32'(c) * 32'd12345) >> 20) % 9 - 4;
    v     = int'($floor(real'(amp(c, frame / SEG)) * $sin(ph) + 0.5)) + nz;
    return v > 127 ? 127 : (v < -128 ? -128 : v);
  endfunction

  always_comb for (int c = 0; c < 3; c++) sample[c] = 8'(gen(c, loads[c]));

  // ---------------- reference model ----------------
  sleep_ref_model model;

  function automatic int model_frame(int j);
    int e [4];
    for (int k = 0; k < 4; k++) e[k] = gen(2, 4 * j + k);
    return model.frame(j, e, gen(0, j), gen(1, j));
  endfunction

  // ---------------- mechanism counters ----------------
  int n_emg_only = 0, n_frames = 0, n_fir = 0, n_avg = 0, n_wr = 0, n_skip = 0;
  int n_div0 = 0, n_peaks = 0, n_stage [3];
  int lat_min = 1 << 30, lat_max = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_filter.start && !dut.u_filter.busy) begin
      if (dut.u_filter.avg_mode) begin
        n_avg++;
        if (dut.u_filter.wr_win) n_wr++; else n_skip++;
      end else n_fir++;
    end
    if (peak) n_peaks++;
  end

  // ---------------- sampling clock and checks ----------------
  longint edge_time;
  bit     run_fast = 0;

  initial begin
    // 800 Hz: 1.25 ms period
    wait (rst_n);
    #100000;
    while (!run_fast) begin
      sample_clk = 1; #625000;
      sample_clk = 0; #625000;
    end
    repeat (60) begin
      sample_clk = 1; #20000;
      sample_clk = 0; #20000;
    end
  end

  int tick_count = 0;
  always @(posedge sample_clk) begin
    tick_count++;
    if (tick_count % 4 == 0) edge_time = $time; else n_emg_only++;
  end

  initial begin
    int q, lat;
    int exp_stage;
    vth_emg = 255; vth_ratio = 255;
    n_stage = '{0, 0, 0};
    model = new(4);
    #2000;
    rst_n = 1;
    for (int j = 0; j < NFRAMES; j++) begin
      @(posedge clk iff stage_valid);
      n_frames++;
      lat = int'(($time - edge_time) / 588);
      if (lat < lat_min) lat_min = lat;
      if (lat > lat_max) lat_max = lat;
      q = model_frame(j);
      if (model.avg[0] == 0) n_div0++;
      exp_stage = model.stage(q, int'(vth_emg), int'(vth_ratio));
      n_stage[exp_stage]++;
      checks += 5;
      if (eeg_ratio !== 8'(q)) begin failures++; $display("frame %0d ratio %0d expected %0d", j, eeg_ratio, q); end
      if (emg_avg !== 8'(model.avg[2])) begin failures++; $display("frame %0d emg_avg %0d expected %0d", j, emg_avg, model.avg[2]); end
      if (sleep_stage !== 2'(exp_stage)) begin failures++; $display("frame %0d stage %0d expected %0d", j, sleep_stage, exp_stage); end
      if (n_peaks != model.peaks) begin failures++; $display("frame %0d peaks %0d expected %0d", j, n_peaks, model.peaks); end
      if (lat > LAT_MAX) begin failures++; $display("frame %0d latency %0d cycles", j, lat); end
      // thresholds for the next frame: rotate through the three outcomes
      @(negedge clk);
      case ((j / 10) % 3)
        0: begin vth_emg = 8'(model.avg[2] + 1); vth_ratio = 0; end       // REM if ratio > 0
        1: begin vth_emg = 8'(model.avg[2] + 1); vth_ratio = 255; end     // NREM
        default: begin vth_emg = 0; vth_ratio = 0; end              // AWAKE if EMG > 0
      endcase
    end
    checks++;
    if (overrun) begin failures++; $display("overrun at real-time rate"); end
    run_fast = 1;
    #2500000;
    checks++;
    if (!overrun) begin failures++; $display("overrun not flagged"); end

    $display("frames %0d, EMG-only passes %0d, FIR runs %0d, AVG runs %0d (write %0d, skip %0d)",
             n_frames, n_emg_only, n_fir, n_avg, n_wr, n_skip);
    $display("stages AWAKE %0d NREM %0d REM %0d, divide-by-zero %0d, peaks %0d",
             n_stage[0], n_stage[1], n_stage[2], n_div0, n_peaks);
    $display("latency %0d..%0d cycles of the filter clock", lat_min, lat_max);
    checks += 9;
    if (n_emg_only == 0) failures++;
    if (n_fir == 0) failures++;
    if (n_wr == 0) failures++;
    if (n_skip == 0) failures++;
    if (n_stage[0] == 0) failures++;
    if (n_stage[1] == 0) failures++;
    if (n_stage[2] == 0) failures++;
    if (n_div0 == 0) failures++;
    if (n_peaks == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
