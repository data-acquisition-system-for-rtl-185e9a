// Self-checking testbench of amp_disc: random readings and thresholds; hit
// must equal reading >= threshold and rise must mark each 0 -> 1 change.
module tb_amp_disc;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1, ce = 0, hit, rise;
  logic [11:0] sample = 0, thr = 0;
  always #5ns clk = ~clk;
  int checks = 0, failures = 0;
  bit prev = 0, exp_hit;
  amp_disc dut (.*);
  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ce = 1; sample = 12'($urandom); thr = (i % 50 == 0) ? sample : 12'(2048 + ($urandom % 64) - 32);
      if (i % 7 == 0) sample = thr - 1;
      exp_hit = (sample >= thr);
      @(negedge clk); ce = 0;
      checks++;
      if (hit != exp_hit || rise != (exp_hit && !prev)) begin
        failures++; $display("FAIL s=%0d thr=%0d hit=%0d rise=%0d", sample, thr, hit, rise);
      end
      prev = exp_hit;
      @(negedge clk);
      checks++;
      if (rise) begin failures++; $display("FAIL rise longer than one cycle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
