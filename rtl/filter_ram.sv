// filter_ram: single-port synchronous RAM used by the shared filter.
//
// Four of these hold the filter data: one keeps the 64-sample FIR delay lines
// of all three channels side by side (channel offsets 0, 64, 128), the other
// three each keep one channel's 512-entry averaging window. The depth and the
// 9-bit address / 8-bit data widths are the reference design's; the one-cycle read
// latency (data appears on rdata the cycle after addr) is this design's
// choice, matching FPGA block RAM. A write stores wdata at addr at the clock
// edge; rdata in that cycle is the old content.
module filter_ram #(
  parameter int unsigned AW = 9,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
