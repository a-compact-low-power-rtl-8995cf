// coeff_flashrom: coefficient store of the shared FIR filter.
//
// The three FIR filters are symmetric 64-tap band-pass filters, so only the
// first 32 coefficients of each are kept: EEG1 (0-4 Hz) at addresses 0-31,
// EEG2 (5-10 Hz) at 32-63 and EMG (100-200 Hz) at 64-95. On the target FPGA
// this is a non-volatile FlashROM; here it is a synchronous-read ROM array
// (coeff valid one cycle after addr), initialised from fir_coeffs.hex.
// Sizes (7-bit address, 8-bit coefficient, 3 x 32 words) follow the reference design.
// The coefficient values are this design's: a 64-tap Hamming-windowed sinc
// band-pass h[n] = w[n] * (2 f2/fs sinc(2 f2/fs m) - 2 f1/fs sinc(2 f1/fs m)),
// m = n - 31.5, w[n] = 0.54 - 0.46 cos(2 pi n / 63), rounded to
// round(128 h[n]) (signed Q1.7) and clipped to -127..127.
module coeff_flashrom #(
  parameter int unsigned AW        = 7,
  parameter int unsigned DW        = 8,
  parameter int unsigned DEPTH     = 96,
  parameter string       INIT_FILE = "rtl/fir_coeffs.hex"
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] coeff
);

  logic [DW-1:0] rom [DEPTH];

  initial $readmemh(INIT_FILE, rom);

  always_ff @(posedge clk) begin
    coeff <= (addr < AW'(DEPTH)) ? rom[addr] : '0;
  end

endmodule
