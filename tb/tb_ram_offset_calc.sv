// tb_ram_offset_calc: exhaustive check of the channel offsets in both stages.
module tb_ram_offset_calc;
  import sleep_pkg::*;
  channel_e   chan;
  logic       stage;
  logic [8:0] addr_in, addr_out;
  int checks = 0, failures = 0;

  ram_offset_calc dut (.chan, .stage, .addr_in, .addr_out);

  initial begin
    for (int c = 0; c < 3; c++)
      for (int s = 0; s < 2; s++)
        for (int a = 0; a < 64; a++) begin
          chan = channel_e'(c); stage = 1'(s); addr_in = 9'(a);
          #1;
          checks++;
          if (addr_out !== 9'(a + (s != 0 ? 64 * c : 0))) begin
            failures++;
            $display("ch %0d stage %0d addr %0d -> %0d", c, s, a, addr_out);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
