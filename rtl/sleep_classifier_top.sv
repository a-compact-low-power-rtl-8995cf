// sleep_classifier_top: real-time sleep stage classifier with theta-peak output.
//
// Three bio-signals arrive as serial 8-bit samples: cortex EEG (EEG1) and
// hippocampus EEG (EEG2) at 200 S/s, neck EMG at 800 S/s. One shared filter
// does all the signal processing by time multiplexing, under control_fsm:
//   signal_acquisition -> filter input mux -> fir_avg_filter
// The filter first band-passes a sample (0-4 Hz, 5-10 Hz or 100-200 Hz FIR,
// by channel), then, with its own output fed back through the filter input
// mux, updates and sums the channel's averaging window. The three averages go
// to sleep_stage_detect (EMG threshold, then theta/delta ratio threshold,
// ratio by a repeated-subtraction divider on clk_div), and every EEG2 FIR
// output goes to peak_detect, whose pulse can time a stimulus.
//
// Clocks: clk is the filter clock (1.7 MHz in the reference system), clk_div
// the divider clock (40 MHz there); they may be asynchronous. sample_clk is
// the 800 Hz sampling clock and is synchronized inside. rst_n is an
// asynchronous active-low reset; afterwards the filter spends 512 clk cycles
// clearing its RAMs.
// Serial front end: when ser_load is high the front end must present a new
// sample of channel ser_chan on its line of ser_in (MSB on the line); while
// ser_shift is high one bit is taken at each clk edge and the front end moves
// to the next bit.
// Outputs: sleep_stage (AWAKE 0 / NREM 1 / REM 2) with a stage_valid pulse
// once per 200 S/s frame, about 1780 clk cycles after the sampling edge that
// starts the frame; peak pulses once per detected theta peak; eeg_ratio and
// emg_avg are the two quantities compared with the thresholds.
// The block diagram follows the reference design; see each block for its own choices.
module sleep_classifier_top
  import sleep_pkg::*;
#(
  parameter int unsigned AVG_STRIDE = 4
) (
  input  logic              clk,
  input  logic              clk_div,
  input  logic              rst_n,
  input  logic              sample_clk,
  input  logic [N_CHAN-1:0] ser_in,        // {EMG, EEG2, EEG1}
  input  logic [DATA_W-1:0] vth_emg,
  input  logic [DATA_W-1:0] vth_ratio,
  output logic [1:0]        ser_chan,
  output logic              ser_load,
  output logic              ser_shift,
  output logic [1:0]        sleep_stage,
  output logic              stage_valid,
  output logic              peak,
  output logic [DATA_W-1:0] eeg_ratio,
  output logic [DATA_W-1:0] emg_avg,
  output logic              overrun
);

  channel_e          chan;
  logic              acq_start, acq_done, acq_busy;
  logic [DATA_W-1:0] acq_data;
  logic              filt_start, filt_avg, filt_wr_win, filt_done, filt_busy;
  logic [DATA_W-1:0] filt_din, filt_dout;
  logic              avg_valid, peak_en, det_start, det_done, det_busy, out_en;
  stage_e            det_stage;

  control_fsm #(.EMG_PER_FRAME(4), .AVG_STRIDE(AVG_STRIDE)) u_fsm (
    .clk, .rst_n, .sample_clk,
    .chan, .acq_start, .acq_done,
    .filt_start, .filt_avg, .filt_wr_win, .filt_done, .filt_busy,
    .avg_valid, .peak_en, .det_start, .det_done, .out_en, .overrun
  );

  signal_acquisition #(.DW(DATA_W)) u_acq (
    .clk, .rst_n, .start(acq_start), .chan, .ser_in,
    .ser_load, .ser_shift, .dout(acq_data), .done(acq_done), .busy(acq_busy)
  );

  // FILTER INPUT MUX: new sample for the FIR, own FIR output for the average
  assign filt_din = filt_avg ? filt_dout : acq_data;

  fir_avg_filter u_filter (
    .clk, .rst_n, .start(filt_start), .avg_mode(filt_avg), .chan,
    .wr_win(filt_wr_win), .din(filt_din), .dout(filt_dout),
    .done(filt_done), .busy(filt_busy)
  );

  sleep_stage_detect u_detect (
    .clk, .clk_div, .rst_n,
    .avg_valid, .avg_chan(chan), .avg_value(filt_dout),
    .start(det_start), .vth_emg, .vth_ratio,
    .stage(det_stage), .ratio(eeg_ratio), .emg_avg,
    .done(det_done), .busy(det_busy)
  );

  peak_detect #(.DW(DATA_W)) u_peak (
    .clk, .rst_n, .en(peak_en), .x(filt_dout), .peak
  );

  // OUTPUT ENABLE: the stage output changes only once per frame
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sleep_stage <= STAGE_NREM;
      stage_valid <= 1'b0;
    end else begin
      stage_valid <= out_en;
      if (out_en) sleep_stage <= det_stage;
    end
  end

  assign ser_chan = chan;

endmodule
