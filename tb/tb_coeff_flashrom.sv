// tb_coeff_flashrom: checks every ROM word against the coefficient formula,
// including the one-cycle read latency and the symmetric half storage.
module tb_coeff_flashrom;
  import tb_coef_pkg::*;

  logic       clk = 0;
  logic [6:0] addr;
  logic [7:0] coeff;
  int checks = 0, failures = 0;

  coeff_flashrom dut (.clk, .addr, .coeff);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = '0;
    for (int a = 0; a < 96; a++) begin
      @(negedge clk) addr = 7'(a);
      @(negedge clk);
      checks++;
      if ($signed(coeff) !== 8'(coef(a / 32, a % 32))) begin
        failures++;
        $display("addr %0d: got %0d expected %0d", a, $signed(coeff), coef(a / 32, a % 32));
      end
    end
    // symmetry: tap 63-i equals tap i
    for (int ch = 0; ch < 3; ch++)
      for (int i = 0; i < 32; i++) begin
        checks++;
        if (coef(ch, i) != coef(ch, 63 - i)) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
