// Self-checking testbench of delay_line: a counting reading stream with a
// strobe every 4 clocks; for several delays (0, 1, 37, 375, 1023) dout must
// equal the reading `delay` strobes back.
module tb_delay_line;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1, ce = 0;
  logic [11:0] din = 0, dout;
  logic [9:0] delay = 0;
  always #5ns clk = ~clk;
  int checks = 0, failures = 0;
  delay_line dut (.*);
  initial begin
    #5ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int delays[5] = '{0, 1, 37, 375, 1023};
    int n = 0;
    repeat (3) @(posedge clk); rst <= 0;
    foreach (delays[d]) begin
      delay = 10'(delays[d]);
      for (int i = 0; i < 1200; i++) begin
        @(negedge clk); ce = 1; din = 12'(n * 7 + 3);
        @(negedge clk); ce = 0;
        if (n >= 1024) begin
          checks++;
          if (dout != 12'((n - delays[d]) * 7 + 3)) begin
            failures++; $display("FAIL delay=%0d n=%0d dout=%0d", delays[d], n, dout);
          end
        end
        n++;
        repeat (2) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
