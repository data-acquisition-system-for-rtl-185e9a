// Self-checking testbench of ts_counter: counts only after start, counts one
// per clock, holds after stop, restarts from zero.
module tb_ts_counter;
  timeunit 1ns; timeprecision 1ps;
  import proton_pkg::*;
  logic clk = 0, rst = 1, start_run = 0, stop_run = 0, running;
  ts_t ts;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  ts_counter dut (.*);
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s ts=%0d", what, ts); end
  endtask
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    repeat (10) @(posedge clk); #1;
    chk(ts == 0 && !running, "idle before start");
    start_run = 1; @(posedge clk); #1; start_run = 0;
    chk(running && ts == 0, "started");
    repeat (100) @(posedge clk); #1;
    chk(ts == 100, "100 ticks");
    stop_run = 1; @(posedge clk); #1; stop_run = 0;
    repeat (50) @(posedge clk); #1;
    chk(!running && ts == 101, "held after stop");
    start_run = 1; @(posedge clk); #1; start_run = 0;
    repeat (7) @(posedge clk); #1;
    chk(running && ts == 7, "restart from zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
