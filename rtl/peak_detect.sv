// peak_detect: theta-band peak detector on the filtered hippocampus EEG.
//
// Each time en is high a new 5-10 Hz band-passed sample x arrives. A peak is
// reported for the previous sample when it rose above the sample before it,
// the new sample is not above it, and it exceeds PEAK_MIN (so that troughs
// and ripples around zero are ignored). peak is a one-cycle pulse in the
// cycle after en, one sample period after the peak itself. That a peak
// detector works on the filtered hippocampus channel is the reference design's; the
// local-maximum rule and PEAK_MIN are this design's.
module peak_detect #(
  parameter int unsigned      DW       = 8,
  parameter logic signed [DW-1:0] PEAK_MIN = '0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [DW-1:0] x,
  output logic                 peak
);

  logic signed [DW-1:0] x1, x2;   // previous and second previous samples

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1   <= '0;
      x2   <= '0;
      peak <= 1'b0;
    end else begin
      peak <= 1'b0;
      if (en) begin
        peak <= (x1 > x2) && (x <= x1) && (x1 > PEAK_MIN);
        x2   <= x1;
        x1   <= x;
      end
    end
  end

endmodule
