// Self-checking testbench of et_ring_buffer: a counting delayed-reading
// stream (one strobe per 4 clocks) and fifteen self-triggers of 80-reading
// events, more than the 1K ring holds. A trigger with a wide window must
// return exactly the twelve newest events (older ones were overwritten), a
// trigger with a 4500-tick window only those in that window; every event is
// checked word by word (header, timestamp, readings, last mark). A
// self-trigger during a capture must be counted as lost.
module tb_et_ring_buffer;
  timeunit 1ns; timeprecision 1ps;
  import proton_pkg::*;
  logic clk = 0, rst = 1;
  always #5ns clk = ~clk;
  int checks = 0, failures = 0;
  logic [5:0] ch = 6'd17;
  logic [LEN_W-1:0] len = 12'd80;
  logic [15:0] window = 16'd60000;
  ts_t ts = 0;
  logic running = 1, self_trig = 0, ce = 0, trigger = 0;
  logic [11:0] din = 0;
  logic out_valid, out_last, out_ready = 1;
  word_t out_data;
  logic [15:0] n_captured, n_lost, n_sent;
  et_ring_buffer dut (.*);

  typedef struct { ts_t t; int first; } ev_t;
  ev_t evs[$];
  word_t got[$];
  int ce_count = 0, n_strobe = 0;

  always @(posedge clk) begin
    if (self_trig && !dut.cap_busy && running) evs.push_back('{ts, ce_count + int'(ce)});
    if (ce) ce_count++;
    if (!rst && out_valid && out_ready) got.push_back(out_data);
    ts <= ts + 1;
    out_ready <= ($urandom % 3 != 0);
  end
  initial forever begin
    @(negedge clk); ce = 0;
    if (!rst && ($time / 10) % 4 == 0) begin ce = 1; din = 12'(n_strobe); n_strobe++; end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pulse_self();
    @(negedge clk); self_trig = 1; @(negedge clk); self_trig = 0;
  endtask

  // expected reload of the events in evs[lo..hi]
  task automatic expect_events(input int lo, input int hi);
    int k = 0;
    chk(got.size() == (hi - lo + 1) * 85, $sformatf("reload size %0d, expected %0d events", got.size(), hi - lo + 1));
    for (int e = lo; e <= hi && k + 85 <= got.size(); e++) begin
      chk(got[k] == {2'b11, ch, 8'h00} && got[k+1] == {4'h0, len}, "header");
      chk(got[k+2] == {4'h0, evs[e].t[43:32]} && got[k+3] == evs[e].t[31:16] && got[k+4] == evs[e].t[15:0],
          $sformatf("timestamp of event %0d", e));
      for (int i = 0; i < 80; i++)
        if (got[k+5+i] != {4'h0, 12'(evs[e].first + i)}) begin
          chk(0, $sformatf("event %0d reading %0d", e, i)); break;
        end
      k += 85;
    end
  endtask

  initial begin
    #10ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ts_t t2;
    repeat (5) @(posedge clk); rst <= 0;
    repeat (20) @(posedge clk);
    for (int e = 0; e < 15; e++) begin
      pulse_self();
      if (e == 3) begin repeat (50) @(negedge clk); pulse_self(); end   // during capture: lost
      repeat (400) @(negedge clk);
    end
    chk(n_captured == 15 && n_lost == 1, $sformatf("captured %0d lost %0d", n_captured, n_lost));
    // wide window: the 12 newest events survive in 1024 words
    got.delete();
    @(negedge clk); trigger = 1; @(negedge clk); trigger = 0;
    repeat (3000) @(negedge clk);
    expect_events(3, 14);
    // narrow window: 2000 ticks before the trigger
    window = 16'd4500;
    got.delete();
    @(negedge clk); trigger = 1; t2 = ts; @(negedge clk); trigger = 0;
    repeat (3000) @(negedge clk);
    begin
      int lo;
      lo = 15;
      while (lo > 3 && (t2 - evs[lo-1].t) <= 4500) lo--;
      chk(lo < 15 && lo > 3, "window selects some events");
      expect_events(lo, 14);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
