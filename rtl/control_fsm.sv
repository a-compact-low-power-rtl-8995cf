// control_fsm: schedules the shared filter among the three channels.
//
// Timing control: the 800 Hz sampling clock is synchronized with two flops
// and its rising edge starts a pass. Every pass reads and FIR-filters one EMG
// sample. Every EMG_PER_FRAME-th pass (200 S/s) continues at once with the
// rest of the frame: the EMG window average, then EEG1 (cortex) and EEG2
// (hippocampus), each acquired, FIR-filtered and window-averaged, then the
// sleep stage detection and finally output enable. Otherwise the FSM waits
// for the next sampling edge. Channel select, mode selection (FIR / average,
// with wr_win set on every AVG_STRIDE-th frame so that the 512-entry windows
// span AVG_STRIDE x 512 frames) and the strobes to the datapath blocks are
// decoded from the state.
// Handshakes: each *_start is a one-cycle pulse, answered by the block's done
// pulse; the filter is started only when it is not busy. avg_valid pulses as
// each average completes (the filter result is then on its output), peak_en
// as each EEG2 FIR result completes, out_en when a new stage is ready.
// A sampling edge that arrives while a pass is running is kept (one deep) and
// served next; a second one before that sets the sticky overrun flag.
// The 800 Hz EMG rate, the once-every-fourth EEG processing and the four FSM
// functions (channel select, timing control, mode selection, output enable)
// are the reference design's; the order within a frame, the stride and the overrun
// handling are this design's.
module control_fsm
  import sleep_pkg::*;
#(
  parameter int unsigned EMG_PER_FRAME = 4,
  parameter int unsigned AVG_STRIDE    = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     sample_clk,
  output channel_e chan,
  output logic     acq_start,
  input  logic     acq_done,
  output logic     filt_start,
  output logic     filt_avg,
  output logic     filt_wr_win,
  input  logic     filt_done,
  input  logic     filt_busy,
  output logic     avg_valid,
  output logic     peak_en,
  output logic     det_start,
  input  logic     det_done,
  output logic     out_en,
  output logic     overrun
);

  typedef enum logic [3:0] {
    C_IDLE, C_ACQ, C_ACQ_W, C_FIR, C_FIR_W, C_AVG, C_AVG_W, C_DET, C_DET_W, C_OUT
  } cstate_e;

  cstate_e state;
  channel_e chan_q;
  logic s1, s2, s3, tick, pending;
  logic [$clog2(EMG_PER_FRAME)-1:0] pass_cnt;
  logic [$clog2(AVG_STRIDE+1)-1:0]  stride_cnt;
  logic frame_pass;

  assign tick       = s2 && !s3;
  assign frame_pass = (pass_cnt == $bits(pass_cnt)'(EMG_PER_FRAME - 1));
  assign chan       = chan_q;

  always_comb begin
    acq_start   = (state == C_ACQ);
    filt_start  = ((state == C_FIR) || (state == C_AVG)) && !filt_busy;
    filt_avg    = (state == C_AVG);
    filt_wr_win = (state == C_AVG) && (stride_cnt == '0);
    avg_valid   = (state == C_AVG_W) && filt_done;
    peak_en     = (state == C_FIR_W) && filt_done && (chan_q == CH_EEG2);
    det_start   = (state == C_DET);
    out_en      = (state == C_OUT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1         <= 1'b0;
      s2         <= 1'b0;
      s3         <= 1'b0;
      pending    <= 1'b0;
      overrun    <= 1'b0;
      state      <= C_IDLE;
      chan_q     <= CH_EMG;
      pass_cnt   <= '0;
      stride_cnt <= '0;
    end else begin
      s1 <= sample_clk;
      s2 <= s1;
      s3 <= s2;
      if (tick) begin
        if (pending && state != C_IDLE) overrun <= 1'b1;
        pending <= 1'b1;
      end
      unique case (state)
        C_IDLE: if (pending || tick) begin
          pending <= 1'b0;
          chan_q  <= CH_EMG;
          state   <= C_ACQ;
        end
        C_ACQ:   state <= C_ACQ_W;
        C_ACQ_W: if (acq_done) state <= C_FIR;
        C_FIR:   if (!filt_busy) state <= C_FIR_W;
        C_FIR_W: if (filt_done) begin
          if (chan_q == CH_EMG && !frame_pass) begin
            pass_cnt <= pass_cnt + 1'b1;
            state    <= C_IDLE;
          end else begin
            state <= C_AVG;
          end
        end
        C_AVG:   if (!filt_busy) state <= C_AVG_W;
        C_AVG_W: if (filt_done) begin
          unique case (chan_q)
            CH_EMG:  begin chan_q <= CH_EEG1; state <= C_ACQ; end
            CH_EEG1: begin chan_q <= CH_EEG2; state <= C_ACQ; end
            default: state <= C_DET;
          endcase
        end
        C_DET:   state <= C_DET_W;
        C_DET_W: if (det_done) state <= C_OUT;
        C_OUT: begin
          pass_cnt   <= '0;
          stride_cnt <= (stride_cnt == $bits(stride_cnt)'(AVG_STRIDE - 1)) ? '0 : stride_cnt + 1'b1;
          chan_q     <= CH_EMG;
          state      <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

endmodule
