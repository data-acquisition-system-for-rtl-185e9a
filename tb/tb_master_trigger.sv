// Self-checking testbench of master_trigger: trigger requests during a run
// become triggers 3 cycles after the synchronized request edge; requests while busy,
// closer than min_gap to the last trigger, or outside a run do not; every
// request during a run is recorded with its timestamp and used flag.
module tb_master_trigger;
  timeunit 1ns; timeprecision 1ps;
  import proton_pkg::*;
  logic clk = 0, rst = 1;
  always #5ns clk = ~clk;
  int checks = 0, failures = 0;
  logic tr_async = 0, running = 0, busy = 0, trig, rd_valid, rd_en = 0;
  logic [31:0] min_gap = 32'd100;
  ts_t ts = 0;
  word_t rd_data;
  logic [11:0] count;
  logic [15:0] n_tr, n_trig, n_busy_rej;
  master_trigger dut (.*);

  typedef struct { ts_t t; bit used; } rec_t;
  rec_t exp_q[$];
  int trig_times[$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    ts <= ts + 1;
    if (!rst && trig) trig_times.push_back(cyc);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // request: pulse TR for 3 cycles; the edge is seen 2 cycles later
  task automatic request(input bit exp_used);
    int c0;
    @(negedge clk); tr_async = 1; c0 = cyc;
    @(negedge clk); @(negedge clk);
    if (running) exp_q.push_back('{ts, exp_used});   // ts when the edge is seen
    @(negedge clk); tr_async = 0;
    repeat (3) @(negedge clk);
    if (exp_used) chk(trig_times.size() > 0 && trig_times[$] == c0 + 4, "trigger latency");
  endtask

  initial begin
    #1ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    request(0);                               // not running
    running = 1;
    request(1);
    repeat (20) @(negedge clk); request(0);   // within min_gap
    repeat (120) @(negedge clk); request(1);
    busy = 1; repeat (120) @(negedge clk); request(0);
    busy = 0; request(1);
    repeat (10) @(negedge clk);
    chk(trig_times.size() == 3 && n_trig == 3, $sformatf("triggers %0d", trig_times.size()));
    chk(n_tr == 5 && n_busy_rej == 1, "request counters");
    chk(int'(count) == 3 * exp_q.size(), "record word count");
    foreach (exp_q[i]) begin
      word_t w[3];
      for (int k = 0; k < 3; k++) begin
        @(negedge clk); w[k] = rd_data; rd_en = 1; @(negedge clk); rd_en = 0;
      end
      chk(w[0] == {3'b111, exp_q[i].used, exp_q[i].t[43:32]} && w[1] == exp_q[i].t[31:16] &&
          w[2] == exp_q[i].t[15:0], $sformatf("record %0d: %h %h %h", i, w[0], w[1], w[2]));
    end
    chk(!rd_valid, "records drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
