// tb_filter_ram: random writes and reads against a reference array; checks
// the one-cycle read latency and that a write does not disturb other words.
module tb_filter_ram;
  logic       clk = 0;
  logic       we;
  logic [8:0] addr;
  logic [7:0] wdata, rdata;
  logic [7:0] model [512];
  logic [511:0] known;
  int checks = 0, failures = 0;

  filter_ram dut (.clk, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    known = '0;
    we = 0; addr = 0; wdata = 0;
    for (int a = 0; a < 512; a++) begin
      @(negedge clk);
      we = 1; addr = 9'(a); wdata = 8'($urandom);
      model[a] = wdata; known[a] = 1'b1;
    end
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      we = $urandom_range(0, 2) == 0;
      addr = 9'($urandom);
      wdata = 8'($urandom);
      begin
        logic [8:0] a_q; logic [7:0] exp_d;
        a_q = addr; exp_d = model[a_q];
        if (we) model[a_q] = wdata;
        @(negedge clk);
        we = 0;
        checks++;
        if (rdata !== exp_d) begin
          failures++;
          $display("addr %0d: got %h expected %h", a_q, rdata, exp_d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
