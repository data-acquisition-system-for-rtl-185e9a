// Self-checking testbench of the asf12ep board logic at two channels and
// small FIFOs. A concentrator model sends commands over a serial link and
// receives the data stream. Checks: the trigger-request chain (tr_in passed
// on, local requests only during a run and only from enabled channels), one
// event per channel per trigger with the channel number, the common trigger
// timestamp and the configured length, events kept back while "hold" is in
// force and delivered after "resume".
module tb_asf12ep;
  timeunit 1ns; timeprecision 1ps;
  import proton_pkg::*;
  localparam int NCH = 2, LEN = 50;
  logic clk = 0, rst = 1;
  always #5ns clk = ~clk;
  int checks = 0, failures = 0;
  logic [11:0] v0, v1, s0, s1;
  logic lclk, frame, lclk1, frame1;
  logic [NCH-1:0] d_rise, d_fall;
  int n0, n1;
  ep_cfg_t cfg;
  tr_mode_e tr_mode [NCH];
  logic sdi, sdo, tr_in = 0, tr_out, running, hold;
  logic [15:0] n_events [NCH], n_dropped [NCH], n_ignored [NCH];
  logic [9:0] dev_count;

  ads5282_model a0 (.value(v0), .lclk, .frame, .d_rise(d_rise[0]), .d_fall(d_fall[0]), .sent(s0), .sent_no(n0));
  ads5282_model a1 (.value(v1), .lclk(lclk1), .frame(frame1), .d_rise(d_rise[1]), .d_fall(d_fall[1]), .sent(s1), .sent_no(n1));
  always @(n0) v0 = ((n0 % 200) < 4) ? 12'd3900 : 12'd300;
  always @(n1) v1 = 12'(n1 % 4096);

  asf12ep #(.NCH(NCH), .CH_FIFO(256), .DEV_FIFO(512), .CH_BASE(6'd12)) dut (.*);

  // concentrator side
  logic c_valid = 0, c_ready, r_valid, r_cmd;
  word_t c_word = 0, r_word;
  word_t rcv[$];
  sl_tx u_ctx (.clk, .rst, .cmd_valid(c_valid), .cmd_word(c_word), .cmd_ready(c_ready),
               .data_valid(1'b0), .data_word('0), .data_ready(), .sdo(sdi));
  sl_rx u_crx (.clk, .rst, .sdi(sdo), .valid(r_valid), .is_cmd(r_cmd), .word(r_word), .frame_err());
  ts_t ts_ref = 0;     // concentrator's own timestamp, started with the command
  int tr_rises = 0;
  logic tr_q = 0;
  always @(posedge clk) if (!rst) begin
    if (r_valid && !r_cmd) rcv.push_back(r_word);
    tr_q <= tr_out;
    if (tr_out && !tr_q) tr_rises++;
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
    cfg = '{amp_thr: 12'd3000, miw_width: 7'd4, miw_thr: 15'd1000, delay: 10'd20, len: 12'(LEN)};
    tr_mode[0] = TR_AMP; tr_mode[1] = TR_OFF;
    repeat (5) @(posedge clk); rst <= 0;
    repeat (4000) @(negedge clk);
    chk(tr_rises == 0, "no trigger requests before the run");
    @(negedge clk); tr_in = 1; @(negedge clk); @(negedge clk);
    chk(tr_out, "tr_in passed on"); tr_in = 0;
    repeat (4) @(negedge clk);
    send(CMD_START_RUN);
    repeat (30) @(negedge clk);
    chk(running, "run started");
    tr_rises = 0;
    repeat (16000) @(negedge clk);     // 160 us = 4000 conversions = 20 pulses
    chk(tr_rises >= 19 && tr_rises <= 21, $sformatf("trigger requests %0d", tr_rises));
    // hold, then trigger: events stay on the board
    send(CMD_HOLD);
    send(CMD_TRIGGER);
    repeat (LEN * 4 + 2000) @(negedge clk);
    chk(rcv.size() == 0 && n_events[0] == 1 && n_events[1] == 1, "held: nothing sent");
    send(CMD_RESUME);
    repeat (2 * (LEN + 5) * 20 + 200) @(negedge clk);
    chk(rcv.size() == 2 * (LEN + 5), $sformatf("received %0d words", rcv.size()));
    if (rcv.size() == 2 * (LEN + 5)) begin
      ts_t t0, t1;
      chk(rcv[0][7:0] == 8'h00 && rcv[0][15:14] == 2'b11, "header marker");
      chk({rcv[0][13:8], rcv[LEN+5][13:8]} == {6'd12, 6'd13} || {rcv[0][13:8], rcv[LEN+5][13:8]} == {6'd13, 6'd12}, "channel numbers");
      chk(rcv[1] == 16'(LEN) && rcv[LEN+6] == 16'(LEN), "length");
      t0 = {rcv[2][11:0], rcv[3], rcv[4]};
      t1 = {rcv[LEN+7][11:0], rcv[LEN+8], rcv[LEN+9]};
      chk(t0 == t1 && t0 > 16000, "common trigger timestamp");
      // channel 13 sees a counting ramp: consecutive readings
      for (int e = 0; e < 2; e++)
        if (rcv[e*(LEN+5)][13:8] == 6'd13)
          for (int i = 1; i < LEN; i++)
            chk(rcv[e*(LEN+5)+5+i] == {4'h0, 12'(rcv[e*(LEN+5)+4+i] + 1)}, "ramp readings");
    end
    send(CMD_STOP_RUN);
    repeat (30) @(negedge clk);
    chk(!running, "run stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
