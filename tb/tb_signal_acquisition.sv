// tb_signal_acquisition: random samples on all three serial lines; checks the
// parallel word, the channel selection and the 10-cycle conversion time.
module tb_signal_acquisition;
  import sleep_pkg::*;
  logic clk = 0, rst_n = 0, start;
  channel_e chan;
  logic [2:0] ser_in;
  logic ser_load, ser_shift, done, busy;
  logic [7:0] dout;
  logic [7:0] sample [3];
  int loads [3];
  int checks = 0, failures = 0;

  signal_acquisition dut (.clk, .rst_n, .start, .chan, .ser_in, .ser_load, .ser_shift, .dout, .done, .busy);
  frontend_model fe (.clk, .ser_chan(chan), .ser_load, .ser_shift, .sample, .ser_out(ser_in), .loads);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    start = 0; chan = CH_EEG1;
    for (int c = 0; c < 3; c++) sample[c] = 8'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 600; k++) begin
      @(negedge clk);
      for (int c = 0; c < 3; c++) sample[c] = 8'($urandom);
      chan = channel_e'($urandom_range(0, 2));
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (dout !== sample[chan]) begin
        failures++;
        $display("chan %0d got %h expected %h", chan, dout, sample[chan]);
      end
      checks++;
      if (cyc != 10) begin
        failures++;
        $display("conversion took %0d cycles", cyc);
      end
      checks++;
      if (busy) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
