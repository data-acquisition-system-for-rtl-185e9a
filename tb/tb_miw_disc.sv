// Self-checking testbench of miw_disc: hit = sum[17:3] >= threshold for
// random sums and thresholds, including the boundary values.
module tb_miw_disc;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1, ce = 0, hit;
  logic [17:0] sum = 0;
  logic [14:0] thr = 0;
  always #5ns clk = ~clk;
  int checks = 0, failures = 0;
  miw_disc dut (.*);
  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ce = 1; thr = 15'($urandom);
      case (i % 4)
        0: sum = {thr, 3'b000};
        1: sum = {thr, 3'b000} - 1;
        default: sum = 18'($urandom);
      endcase
      @(negedge clk); ce = 0;
      checks++;
      if (hit != (sum[17:3] >= thr)) begin
        failures++; $display("FAIL sum=%0d thr=%0d hit=%0d", sum, thr, hit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
