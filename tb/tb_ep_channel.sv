// Self-checking testbench of ep_channel with the ADS5282 model. The ADC sees
// a baseline with occasional pulses. Checks: the channel's trigger request
// follows pulses in amplitude, window and coincidence modes and stays low
// when off; an event recorded on "trigger" holds the header with the trigger
// timestamp and exactly the readings from `delay` samples before the trigger
// onward, and leaves the FIFO, under random consumer stalls, with its last
// word (and only that) marked.
module tb_ep_channel;
  timeunit 1ns; timeprecision 1ps;
  import proton_pkg::*;
  logic clk = 0, rst = 1;
  always #5ns clk = ~clk;
  int checks = 0, failures = 0;
  logic [11:0] value, sent, sample;
  logic lclk, frame, d_rise, d_fall;
  int sent_no;
  ep_cfg_t cfg;
  tr_mode_e tr_mode = TR_AMP;
  logic start_run = 0, trigger = 0, tr, sample_valid, out_valid, out_last, out_ready = 1;
  ts_t ts = 0;
  word_t out_data;
  logic [15:0] n_events, n_dropped, n_ignored;

  ads5282_model adc (.*);
  ep_channel dut (.clk, .rst, .lclk, .frame, .d_rise, .d_fall, .ch(6'd5), .cfg, .tr_mode,
                  .start_run, .trigger, .ts, .tr, .sample_valid, .sample,
                  .out_valid, .out_data, .out_last, .out_ready, .n_events, .n_dropped, .n_ignored);

  // pulse of 6 samples at 3500 every 150 conversions, baseline with noise
  always @(sent_no) value = ((sent_no % 150) < 6) ? 12'd3500 : 12'(200 + $urandom % 16);

  logic [11:0] samples[$];
  int n0 = -1, tr_rises = 0;
  logic tr_q = 0;
  word_t got[$];
  int last_at = 0;
  // the consumer stalls at random one cycle in three
  always @(negedge clk) out_ready = ($urandom_range(2) != 0);
  always @(posedge clk) begin
    ts <= ts + 1;
    if (!rst) begin
      if (trigger) n0 = samples.size();
      if (sample_valid) samples.push_back(sample);
      if (out_valid && out_ready) begin
        got.push_back(out_data);
        if (out_last) last_at = got.size();
      end
      tr_q <= tr;
      if (tr && !tr_q) tr_rises++;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ts_t tt;
    cfg = '{amp_thr: 12'd3000, miw_width: 7'd8, miw_thr: 15'd500, delay: 10'd25, len: 12'd60};
    repeat (5) @(posedge clk); rst <= 0;
    @(negedge clk); start_run = 1; @(negedge clk); start_run = 0;
    // amplitude mode: one request per pulse
    tr_rises = 0; repeat (1500 * 4 * 10 / 10) @(negedge clk);
    chk(tr_rises >= 9 && tr_rises <= 11, $sformatf("amplitude TR %0d", tr_rises));
    // window mode: 6 * 1750 = 10500 > 500 * 8 = 4000; baseline 8 * 104 = 832 < 4000
    tr_mode = TR_MIW; tr_rises = 0; repeat (6000) @(negedge clk);
    chk(tr_rises >= 9 && tr_rises <= 11, $sformatf("window TR %0d", tr_rises));
    cfg.miw_thr = 15'd3000;     // above the pulse sum: no window hits, so no coincidence
    tr_mode = TR_COIN; tr_rises = 0; repeat (6000) @(negedge clk);
    chk(tr_rises == 0, "coincidence needs both");
    cfg.miw_thr = 15'd500; tr_rises = 0; repeat (6000) @(negedge clk);
    chk(tr_rises >= 9, "coincidence");
    tr_mode = TR_OFF; tr_rises = 0; repeat (6000) @(negedge clk);
    chk(tr_rises == 0, "off");
    // trigger shortly after a pulse
    wait (tr_q == 0); @(negedge clk);
    tr_mode = TR_AMP; wait (tr); repeat (13) @(negedge clk);
    trigger = 1; tt = ts; @(negedge clk); trigger = 0;
    repeat (60 * 4 + 100) @(negedge clk);
    chk(last_at == 65, $sformatf("last word marked at %0d", last_at));
    chk(n_events == 1 && got.size() == 65, $sformatf("event words %0d", got.size()));
    if (got.size() == 65) begin
      int pulse_seen;
      pulse_seen = 0;
      chk(got[0] == {2'b11, 6'd5, 8'h00} && got[1] == 16'd60, "header");
      chk({got[2][11:0], got[3], got[4]} == tt, "trigger timestamp");
      for (int i = 0; i < 60; i++) begin
        chk(got[5+i] == {4'h0, samples[n0 - 25 + i]}, $sformatf("reading %0d", i));
        if (got[5+i] == 16'd3500) pulse_seen++;
      end
      chk(pulse_seen == 6, "pulse inside the window");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
