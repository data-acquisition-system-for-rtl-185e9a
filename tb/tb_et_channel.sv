// Self-checking testbench of et_channel with the ADS5282 model: pulses every
// 150 conversions self-trigger the channel; on "trigger" it must send every
// event of the look-back window and no other, each with a correct header,
// its self-trigger timestamp, and the whole pulse inside its readings.
module tb_et_channel;
  timeunit 1ns; timeprecision 1ps;
  import proton_pkg::*;
  logic clk = 0, rst = 1;
  always #5ns clk = ~clk;
  int checks = 0, failures = 0;
  logic [11:0] value, sent;
  logic lclk, frame, d_rise, d_fall;
  int sent_no;
  et_cfg_t cfg;
  logic running = 1, trigger = 0, out_valid, out_last, out_ready = 1;
  ts_t ts = 0;
  word_t out_data;
  logic [15:0] n_captured, n_lost, n_sent;

  ads5282_model adc (.*);
  et_channel dut (.clk, .rst, .lclk, .frame, .d_rise, .d_fall, .ch(6'd33), .cfg, .running,
                  .trigger, .ts, .out_valid, .out_data, .out_last, .out_ready,
                  .n_captured, .n_lost, .n_sent);

  always @(sent_no) value = ((sent_no % 150) < 6) ? 12'd3000 + 12'(sent_no % 150) : 12'(100 + $urandom % 8);

  ts_t cap_ts[$];
  word_t got[$];
  always @(posedge clk) begin
    ts <= ts + 1;
    if (!rst) begin
      if (dut.u_ring.start_cap) cap_ts.push_back(ts);
      if (out_valid && out_ready) got.push_back(out_data);
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
    int n_exp = 0, k = 0;
    cfg = '{thr: 12'd2000, delay: 10'd10, len: 12'd40, window: 16'd2000};
    repeat (5) @(posedge clk); rst <= 0;
    repeat (6000) @(negedge clk);
    @(negedge clk); trigger = 1; tt = ts; @(negedge clk); trigger = 0;
    repeat (1000) @(negedge clk);
    foreach (cap_ts[i]) if (tt - cap_ts[i] <= 2000) n_exp++;
    chk(n_captured >= 9 && n_exp >= 3, $sformatf("captured %0d, in window %0d", n_captured, n_exp));
    chk(got.size() == n_exp * 45, $sformatf("words %0d for %0d events", got.size(), n_exp));
    while (k + 45 <= got.size()) begin
      ts_t et;
      int pulse;
      pulse = 0;
      et = {got[k+2][11:0], got[k+3], got[k+4]};
      chk(got[k] == {2'b11, 6'd33, 8'h00} && got[k+1] == 16'd40, "header");
      chk(tt - et <= 2000, "event inside the window");
      for (int i = 0; i < 40; i++) if (got[k+5+i] >= 16'd3000) pulse++;
      chk(pulse == 6, $sformatf("pulse readings %0d", pulse));
      chk(got[k+5] < 16'd3000, "baseline before the pulse");
      k += 45;
    end
    chk(n_sent == 16'(n_exp), "sent count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
