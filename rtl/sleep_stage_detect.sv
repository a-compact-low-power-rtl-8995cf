// sleep_stage_detect: thresholding and classification.
//
// Keeps the latest window averages of the three channels (written through
// avg_valid / avg_chan / avg_value). On start it divides the hippocampus
// (EEG2, theta band) average by the cortex (EEG1, delta band) average and
// classifies:
//   EMG average > vth_emg                 -> AWAKE
//   otherwise, theta/delta ratio > vth_ratio -> REM
//   otherwise                              -> NREM
// i.e. the EMG comparison enables the ratio comparison. The division runs in
// serial_divider on the fast clock clk_div; the operands are held stable in
// the clk domain and a request toggle and an acknowledge toggle, each through
// a two-flop synchronizer, carry the handshake across. The divider's result
// is read only after the acknowledge has crossed, when it no longer changes.
// Interface: pulse start while busy is low; done pulses with stage, ratio and
// emg_avg valid (held until the next classification). Latency is the
// division (ratio + 2 fast cycles) plus about 3 cycles of each clock for
// the synchronizers. The rule and the subtracting divider on a faster clock
// are the reference design's; the handshake, the strict comparisons and the stage
// encoding are this design's.
module sleep_stage_detect
  import sleep_pkg::*;
(
  input  logic              clk,
  input  logic              clk_div,
  input  logic              rst_n,
  input  logic              avg_valid,
  input  channel_e          avg_chan,
  input  logic [DATA_W-1:0] avg_value,
  input  logic              start,
  input  logic [DATA_W-1:0] vth_emg,
  input  logic [DATA_W-1:0] vth_ratio,
  output stage_e            stage,
  output logic [DATA_W-1:0] ratio,
  output logic [DATA_W-1:0] emg_avg,
  output logic              done,
  output logic              busy
);

  // ---------------- clk domain ----------------
  logic [DATA_W-1:0] eeg1_avg, eeg2_avg, emg_avg_q;
  logic [DATA_W-1:0] num_q, den_q, emg_op;
  logic              req_tgl;
  logic              ack_s1, ack_s2, ack_s3;
  logic              ack_tgl;          // clk_div domain
  logic [DATA_W-1:0] div_quot;         // clk_div domain, stable when read

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eeg1_avg  <= '0;
      eeg2_avg  <= '0;
      emg_avg_q <= '0;
      num_q     <= '0;
      den_q     <= '0;
      emg_op    <= '0;
      req_tgl   <= 1'b0;
      ack_s1    <= 1'b0;
      ack_s2    <= 1'b0;
      ack_s3    <= 1'b0;
      busy      <= 1'b0;
      done      <= 1'b0;
      stage     <= STAGE_NREM;
      ratio     <= '0;
      emg_avg   <= '0;
    end else begin
      done   <= 1'b0;
      ack_s1 <= ack_tgl;
      ack_s2 <= ack_s1;
      ack_s3 <= ack_s2;
      if (avg_valid) begin
        unique case (avg_chan)
          CH_EEG1: eeg1_avg  <= avg_value;
          CH_EEG2: eeg2_avg  <= avg_value;
          CH_EMG:  emg_avg_q <= avg_value;
          default: ;
        endcase
      end
      if (start && !busy) begin
        num_q   <= eeg2_avg;
        den_q   <= eeg1_avg;
        emg_op  <= emg_avg_q;
        req_tgl <= ~req_tgl;
        busy    <= 1'b1;
      end else if (busy && (ack_s2 != ack_s3)) begin
        ratio   <= div_quot;
        emg_avg <= emg_op;
        if (emg_op > vth_emg)       stage <= STAGE_AWAKE;
        else if (div_quot > vth_ratio) stage <= STAGE_REM;
        else                        stage <= STAGE_NREM;
        done    <= 1'b1;
        busy    <= 1'b0;
      end
    end
  end

  // ---------------- clk_div domain ----------------
  logic rst_f1, rst_div_n;
  logic req_f1, req_f2, req_f3;
  logic div_start, div_done, div_busy;

  always_ff @(posedge clk_div or negedge rst_n) begin
    if (!rst_n) begin
      rst_f1    <= 1'b0;
      rst_div_n <= 1'b0;
    end else begin
      rst_f1    <= 1'b1;
      rst_div_n <= rst_f1;
    end
  end

  always_ff @(posedge clk_div or negedge rst_div_n) begin
    if (!rst_div_n) begin
      req_f1  <= 1'b0;
      req_f2  <= 1'b0;
      req_f3  <= 1'b0;
      ack_tgl <= 1'b0;
    end else begin
      req_f1 <= req_tgl;
      req_f2 <= req_f1;
      req_f3 <= req_f2;
      if (div_done) ack_tgl <= ~ack_tgl;
    end
  end

  assign div_start = (req_f2 != req_f3);

  serial_divider #(.W(DATA_W)) u_div (
    .clk  (clk_div),
    .rst_n(rst_div_n),
    .start(div_start),
    .num  (num_q),
    .den  (den_q),
    .quot (div_quot),
    .done (div_done),
    .busy (div_busy)
  );

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
