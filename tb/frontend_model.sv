// frontend_model: behavioural stand-in for the recording front end's serial
// outputs. On a clock edge with ser_load high it latches sample[ser_chan] as
// the next word of that channel; each edge with ser_shift high moves that
// channel to its next bit. Each line shows the current bit, MSB first.
module frontend_model (
  input  logic       clk,
  input  logic [1:0] ser_chan,
  input  logic       ser_load,
  input  logic       ser_shift,
  input  logic [7:0] sample [3],
  output logic [2:0] ser_out,
  output int         loads [3]
);
  logic [7:0] sr [3];

  initial begin
    for (int c = 0; c < 3; c++) begin
      sr[c] = '0;
      loads[c] = 0;
    end
  end

  always @(posedge clk) begin
    if (ser_load) begin
      sr[ser_chan] <= sample[ser_chan];
      loads[ser_chan] <= loads[ser_chan] + 1;
    end else if (ser_shift) begin
      sr[ser_chan] <= {sr[ser_chan][6:0], 1'b0};
    end
  end

  always_comb for (int c = 0; c < 3; c++) ser_out[c] = sr[c][7];
endmodule
