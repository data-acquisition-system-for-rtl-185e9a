// Self-checking testbench of ep_event_builder: a counting delayed-reading
// stream (one strobe per 4 clocks, as at 25 MSPS on a 100 MHz clock) and
// triggers at random times. Checks the five header words, that the readings
// start with the first strobe after the trigger and are consecutive, the
// last-word mark, the recording time (len strobes), a trigger ignored while
// recording and an event dropped for lack of FIFO space.
module tb_ep_event_builder;
  timeunit 1ns; timeprecision 1ps;
  import proton_pkg::*;
  logic clk = 0, rst = 1;
  always #5ns clk = ~clk;
  int checks = 0, failures = 0;
  logic [5:0] ch = 6'd9;
  logic [LEN_W-1:0] len = 12'd40;
  logic trigger = 0, ce = 0, wr_en, active;
  ts_t ts = 0;
  logic [11:0] din = 0;
  logic [15:0] fifo_free = 16'd8192, n_events, n_dropped, n_ignored;
  logic [16:0] wr_data;
  logic [16:0] got[$];
  int n_strobe = 0, first_exp;
  ep_event_builder dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // stream: strobe every 4 clocks, reading = strobe number
  int ce_count = 0, first_mon;
  always @(posedge clk) begin
    if (trigger) first_mon = ce_count + int'(ce);
    if (ce) ce_count++;
    ts <= ts + 1;
    if (!rst && wr_en) got.push_back(wr_data);
  end
  initial forever begin
    @(negedge clk); ce = 0;
    if (!rst && ($time / 10ns) % 4 == 0) begin ce = 1; din = 12'(n_strobe); n_strobe++; end
  end

  initial begin
    #1ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ts_t tt;
    int t_start, t_end;
    repeat (5) @(posedge clk); rst <= 0;
    for (int ev = 0; ev < 6; ev++) begin
      repeat (20 + $urandom % 7) @(negedge clk);
      got.delete();
      trigger = 1; tt = ts;
      t_start = int'($time / 10ns);
      @(negedge clk); trigger = 0;
      first_exp = first_mon;     // first strobe after the trigger cycle
      repeat (30) @(negedge clk);
      if (ev == 1) begin trigger = 1; @(negedge clk); trigger = 0; end   // while active
      wait (!active); t_end = int'($time / 10ns);
      @(negedge clk);
      chk(got.size() == 45, $sformatf("event size %0d", got.size()));
      if (got.size() == 45) begin
        chk(got[0] == {1'b0, 2'b11, ch, 8'h00}, "hdr0");
        chk(got[1] == {1'b0, 4'h0, len}, "hdr1 length");
        chk(got[2][11:0] == tt[43:32] && got[3][15:0] == tt[31:16] && got[4][15:0] == tt[15:0], "timestamp");
        for (int i = 0; i < 40; i++)
          chk(got[5+i] == {i == 39, 4'h0, 12'(first_exp + i)}, $sformatf("reading %0d: %h vs %0d", i, got[5+i], first_exp + i));
      end
      // recording time: 40 strobes of 4 clocks, plus a few cycles of latency
      chk(t_end - t_start >= 156 && t_end - t_start <= 170, $sformatf("duration %0d", t_end - t_start));
    end
    chk(n_ignored == 1, "trigger ignored while recording");
    fifo_free = 16'd44;
    @(negedge clk); trigger = 1; @(negedge clk); trigger = 0;
    repeat (10) @(negedge clk);
    chk(!active && n_dropped == 1 && n_events == 6, "event dropped when FIFO lacks room");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
