// signal_acquisition: channel mux and serial-to-parallel converter.
//
// The recording front end delivers each channel's samples on its own 1-bit
// serial line. On start, this block selects the line of channel chan, raises
// ser_load for one cycle (the front end then presents a new 8-bit sample of
// that channel, MSB first) and raises ser_shift for the next 8 cycles, taking
// one bit per clock edge. done pulses with the assembled two's complement
// sample on dout, 10 cycles after the start edge; dout holds until the next
// sample. The channel mux, the 8-bit parallel output and the triggering by
// the timing controller are the reference design's; the load / shift framing and the
// bit order are this design's choice, as the front end's serial format is not
// specified.
module signal_acquisition
  import sleep_pkg::*;
#(
  parameter int unsigned DW = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  channel_e          chan,
  input  logic [N_CHAN-1:0] ser_in,     // {EMG, EEG2, EEG1}
  output logic              ser_load,
  output logic              ser_shift,
  output logic [DW-1:0] dout,
  output logic              done,
  output logic              busy
);

  typedef enum logic [1:0] {A_IDLE, A_LOAD, A_SHIFT} astate_e;

  astate_e  state;
  channel_e chan_q;
  logic [$clog2(DW)-1:0] bitcnt;
  logic [DW-1:0] sr;
  logic              ser_bit;

  // CHANNEL MUX
  always_comb begin
    unique case (chan_q)
      CH_EEG1: ser_bit = ser_in[0];
      CH_EEG2: ser_bit = ser_in[1];
      CH_EMG:  ser_bit = ser_in[2];
      default: ser_bit = 1'b0;
    endcase
  end

  assign ser_load  = (state == A_LOAD);
  assign ser_shift = (state == A_SHIFT);
  assign busy      = (state != A_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= A_IDLE;
      chan_q <= CH_EEG1;
      bitcnt <= '0;
      sr     <= '0;
      dout   <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        A_IDLE: if (start) begin
          chan_q <= chan;
          state  <= A_LOAD;
        end
        A_LOAD: begin
          bitcnt <= '0;
          state  <= A_SHIFT;
        end
        A_SHIFT: begin
          sr     <= {sr[DW-2:0], ser_bit};
          bitcnt <= bitcnt + 1'b1;
          if (bitcnt == $bits(bitcnt)'(DW - 1)) begin
            dout  <= {sr[DW-2:0], ser_bit};
            done  <= 1'b1;
            state <= A_IDLE;
          end
        end
        default: state <= A_IDLE;
      endcase
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
