// ram_offset_calc: address offset for the shared FIR data RAM.
//
// All three channels keep their 64-sample FIR delay line in one RAM. The
// filter always generates local addresses 0-63; this block adds the channel's
// base (EEG1 0, EEG2 64, EMG 128) during the FIR stage. In the averaging stage
// each channel has a RAM of its own, so the address passes unchanged.
// Purely combinational. The idea (an offset added per channel, controlled by
// channel select and filtering stage) is the reference design's; the offset values
// follow from the channel order chosen in sleep_pkg.
module ram_offset_calc
  import sleep_pkg::*;
#(
  parameter int unsigned AW  = 9,
  parameter int unsigned SEG = 64
) (
  input  channel_e      chan,
  input  logic          stage,    // 1 = FIR stage, 0 = averaging stage
  input  logic [AW-1:0] addr_in,
  output logic [AW-1:0] addr_out
);

  logic [AW-1:0] offset;

  always_comb begin
    offset = '0;
    if (stage) begin
      unique case (chan)
        CH_EEG1: offset = AW'(0);
        CH_EEG2: offset = AW'(SEG);
        CH_EMG:  offset = AW'(2 * SEG);
        default: offset = '0;
      endcase
    end
    addr_out = addr_in + offset;
  end

endmodule
