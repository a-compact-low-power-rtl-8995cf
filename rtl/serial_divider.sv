// serial_divider: unsigned integer divider by repeated subtraction.
//
// Instead of an array divider, the quotient is the number of times den can be
// subtracted from num before the remainder would go negative; one subtraction
// is made per clock. The block is meant for a fast clock (40 MHz in the
// reference system) so that even the longest division, 255 subtractions,
// stays short next to the 1.7 MHz filter clock.
// Interface: pulse start while busy is low with num and den valid; done pulses
// with quot valid (held until the next start) after quot + 2 cycles.
// Division by zero, not covered by the method, returns the largest
// quotient (all ones) after 2 cycles; that choice is this design's.
module serial_divider #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] num,
  input  logic [W-1:0] den,
  output logic [W-1:0] quot,
  output logic         done,
  output logic         busy
);

  logic [W-1:0] rem, den_q, cnt;
  logic         run;

  assign busy = run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem   <= '0;
      den_q <= '0;
      cnt   <= '0;
      quot  <= '0;
      run   <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          rem   <= num;
          den_q <= den;
          cnt   <= '0;
          run   <= 1'b1;
        end
      end else if (den_q == '0) begin
        quot <= '1;
        done <= 1'b1;
        run  <= 1'b0;
      end else if (rem >= den_q) begin
        rem <= rem - den_q;
        cnt <= cnt + 1'b1;
      end else begin
        quot <= cnt;
        done <= 1'b1;
        run  <= 1'b0;
      end
    end
  end

endmodule
