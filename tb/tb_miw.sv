// Self-checking testbench of miw: the window sum is compared with a reference
// sum of the last `width` values of reading[11:1], for several widths
// including the maximum (127, full-scale readings reaching 127 * 2047).
module tb_miw;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1, clear = 0, ce = 0;
  logic [11:0] sample = 0;
  logic [6:0] width = 1;
  logic [17:0] sum;
  always #5ns clk = ~clk;
  int checks = 0, failures = 0;
  int hist[$];
  miw dut (.*);
  initial begin
    #2ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int widths[5] = '{1, 5, 64, 127, 127};
    repeat (3) @(posedge clk); rst <= 0;
    foreach (widths[w]) begin
      @(negedge clk); width = 7'(widths[w]); clear = 1;
      @(negedge clk); clear = 0; hist.delete();
      for (int i = 0; i < 600; i++) begin
        int ref_sum;
        ref_sum = 0;
        @(negedge clk);
        ce = 1;
        sample = (w == 4) ? 12'hFFF : 12'($urandom);
        hist.push_back(int'(sample[11:1]));
        if (hist.size() > widths[w]) void'(hist.pop_front());
        foreach (hist[k]) ref_sum += hist[k];
        @(negedge clk); ce = 0;
        checks++;
        if (int'(sum) != ref_sum) begin
          failures++; $display("FAIL w=%0d i=%0d sum=%0d ref=%0d", widths[w], i, sum, ref_sum);
        end
        repeat (2) @(negedge clk);
      end
    end
    checks++;
    if (sum != 18'(127 * 2047)) begin failures++; $display("FAIL full-scale"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
