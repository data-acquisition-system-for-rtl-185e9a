// Self-checking testbench of the asf48et board logic at two channels: both
// channels self-trigger on pulses; after "trigger" the concentrator model
// must receive, whole and one after another, exactly the events of both
// channels that lie in the look-back window, each with its pulse, and no
// self-trigger may be taken before "start run".
module tb_asf48et;
  timeunit 1ns; timeprecision 1ps;
  import proton_pkg::*;
  localparam int NCH = 2, LEN = 30;
  logic clk = 0, rst = 1;
  always #5ns clk = ~clk;
  int checks = 0, failures = 0;
  logic [11:0] v0, v1, s0, s1;
  logic lclk, frame, lclk1, frame1;
  logic [NCH-1:0] d_rise, d_fall;
  int n0, n1;
  et_cfg_t cfg;
  logic sdi, sdo, running, hold;
  logic [15:0] n_captured [NCH], n_lost [NCH], n_sent [NCH];
  logic [9:0] out_count;

  ads5282_model a0 (.value(v0), .lclk, .frame, .d_rise(d_rise[0]), .d_fall(d_fall[0]), .sent(s0), .sent_no(n0));
  ads5282_model a1 (.value(v1), .lclk(lclk1), .frame(frame1), .d_rise(d_rise[1]), .d_fall(d_fall[1]), .sent(s1), .sent_no(n1));
  always @(n0) v0 = ((n0 % 150) < 5) ? 12'd2500 : 12'd100;
  always @(n1) v1 = ((n1 % 230) < 5) ? 12'd2600 : 12'd120;

  asf48et #(.NCH(NCH), .OUT_FIFO(512)) dut (.*);

  logic c_valid = 0, c_ready, r_valid, r_cmd;
  word_t c_word = 0, r_word;
  word_t rcv[$];
  sl_tx u_ctx (.clk, .rst, .cmd_valid(c_valid), .cmd_word(c_word), .cmd_ready(c_ready),
               .data_valid(1'b0), .data_word('0), .data_ready(), .sdo(sdi));
  sl_rx u_crx (.clk, .rst, .sdi(sdo), .valid(r_valid), .is_cmd(r_cmd), .word(r_word), .frame_err());
  ts_t cap_ts [NCH][$];
  ts_t t_trig = 0;
  always @(posedge clk) if (!rst) begin
    if (r_valid && !r_cmd) rcv.push_back(r_word);
    if (dut.trigger) t_trig = dut.ts;
    if (dut.g_ch[0].u_ch.u_ring.start_cap) cap_ts[0].push_back(dut.ts);
    if (dut.g_ch[1].u_ch.u_ring.start_cap) cap_ts[1].push_back(dut.ts);
  end

  task automatic send(input cmd_e c);
    @(negedge clk); c_valid = 1; c_word = {8'h00, c};
    @(posedge clk); #1; while (!c_ready) begin @(posedge clk); #1; end
    c_valid = 0;
  endtask

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #3ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ts_t tt;
    int n_exp [NCH];
    int k = 0;
    int n_ev [NCH];
    cfg = '{thr: 12'd2000, delay: 10'd8, len: 12'(LEN), window: 16'd3000};
    repeat (5) @(posedge clk); rst <= 0;
    repeat (3000) @(negedge clk);
    chk(n_captured[0] == 0 && n_captured[1] == 0, "idle before the run");
    send(CMD_START_RUN);
    repeat (10000) @(negedge clk);
    send(CMD_TRIGGER);
    repeat (12000) @(negedge clk);
    tt = t_trig;
    for (int c = 0; c < NCH; c++) begin
      n_exp[c] = 0; n_ev[c] = 0;
      foreach (cap_ts[c][i]) if (tt - cap_ts[c][i] <= 3000) n_exp[c]++;
    end
    chk(n_exp[0] >= 3 && n_exp[1] >= 2, "events in the window");
    while (k + LEN + 5 <= rcv.size()) begin
      int c, pulse;
      ts_t et;
      c = int'(rcv[k][13:8]);
      et = {rcv[k+2][11:0], rcv[k+3], rcv[k+4]};
      chk(c < NCH && rcv[k][15:14] == 2'b11 && rcv[k+1] == 16'(LEN), "header");
      chk(tt - et <= 3000, "event in window");
      pulse = 0;
      for (int i = 0; i < LEN; i++) if (rcv[k+5+i] >= 16'd2000) pulse++;
      chk(pulse == 5, "pulse in event");
      if (c < NCH) n_ev[c]++;
      k += LEN + 5;
    end
    chk(k == rcv.size(), "stream made of whole events");
    for (int c = 0; c < NCH; c++) chk(n_ev[c] == n_exp[c], $sformatf("channel %0d events %0d of %0d", c, n_ev[c], n_exp[c]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
