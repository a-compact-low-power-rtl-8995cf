// mac_unit: multiply-accumulate core of the shared filter (D = sum of C_i * D_i).
//
// Each clock with en high adds coeff * data to the sum; the number of
// summations k is therefore the number of enabled cycles (64 for the FIR,
// 512 for the window average). clr starts a new sum: with clr and en both
// high the sum is loaded with the current product. The operands are signed
// 8-bit, the product is kept on 15 bits and the sum on 16 bits, the widths the
// reference design gives; the sum wraps on overflow. The product is exact for all
// operands except -128 x -128, which the filter never presents (coefficients
// are within -127..127, the averaging coefficient is 1).
// acc is registered: it shows the sum one cycle after the last enabled cycle.
module mac_unit #(
  parameter int unsigned DW    = 8,
  parameter int unsigned PW    = 15,
  parameter int unsigned ACC_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    en,
  input  logic signed [DW-1:0]    coeff,
  input  logic signed [DW-1:0]    data,
  output logic signed [ACC_W-1:0] acc
);

  logic signed [2*DW-1:0] prod_full;
  logic signed [PW-1:0]   prod;
  logic signed [ACC_W-1:0] base;

  always_comb begin
    prod_full = coeff * data;
    prod      = PW'(prod_full);
    base      = clr ? '0 : acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      acc <= '0;
    else if (en)     acc <= base + ACC_W'(prod);
    else if (clr)    acc <= '0;
  end

endmodule
