// End-to-end self-checking testbench of the whole acquisition tree at
// reduced size: four ASF12eP and eight ASF48et boards (two per Slave) with two channels
// each, small FIFOs and a 256-reading ring. ADC models feed periodic pulses;
// TPC board 0 channel 0 makes the trigger requests. The run has three
// phases: free flow; a stall in which the output FIFOs of the Master and
// Slave 0 (output index 1) are not read, forcing hold, resume afterwards and
// busy rejection;
// and a drain with the trigger source switched off. At the end every output
// FIFO is parsed: packet headers and checksums must be correct, and the
// events inside must be well formed with the configured lengths; the number
// of events received must equal the number the boards report sent.
// Each mechanism is counted and a failure is recorded if one never occurred:
// trigger, ignored trigger, dropped event, hold, resume, busy rejection,
// self-trigger lost by an ASF48et ring, window reload, and packets on every
// concentrator.
module tb_proton_daq;
  timeunit 1ns; timeprecision 1ps;
  import proton_pkg::*;
  localparam int NEP = 4, NET = 8, NCH = 2, EPLEN = 200, ETLEN = 20;
  logic clk = 0, rst = 1;
  always #5ns clk = ~clk;
  int checks = 0, failures = 0;

  logic ep_lclk [NEP], ep_frame [NEP];
  logic [NCH-1:0] ep_d_rise [NEP], ep_d_fall [NEP];
  ep_cfg_t ep_cfg [NEP];
  tr_mode_e ep_tr_mode [NEP][NCH];
  logic et_lclk [NET], et_frame [NET];
  logic [NCH-1:0] et_d_rise [NET], et_d_fall [NET];
  et_cfg_t et_cfg [NET];
  logic host_cmd_valid = 0, host_cmd_ready;
  cmd_e host_cmd = CMD_NOP;
  logic out_valid [5], out_rd [5], ccb_busy [5];
  word_t out_data [5];
  logic [10:0] out_count [5];
  logic [15:0] ccb_packets [5], ccb_holds [5][12], n_tr, n_trig, n_busy_rej;
  logic [15:0] ep_events [NEP][NCH], ep_dropped [NEP][NCH], ep_ignored [NEP][NCH];
  logic [15:0] et_captured [NET][NCH], et_lost [NET][NCH], et_sent [NET][NCH];
  logic ep_running [NEP], et_running [NET];

  proton_daq #(.ET_PER_SLV(2), .EP_NCH(NCH), .EP_CH_FIFO(256), .EP_DEV_FIFO(512), .ET_NCH(NCH), .ET_RING(256),
               .ET_OUT_FIFO(512), .DELAY_DEPTH(64), .CCB_IN_FIFO(128), .CCB_OUT_FIFO(1024),
               .PKT_MAX(64)) dut (
    .clk, .rst, .ep_lclk, .ep_frame, .ep_d_rise, .ep_d_fall, .ep_cfg, .ep_tr_mode,
    .et_lclk, .et_frame, .et_d_rise, .et_d_fall, .et_cfg,
    .host_cmd_valid, .host_cmd, .host_cmd_ready, .min_gap(32'd50),
    .out_valid, .out_data, .out_rd, .out_count, .ccb_busy, .ccb_packets, .ccb_holds,
    .n_tr, .n_trig, .n_busy_rej, .ep_events, .ep_dropped, .ep_ignored,
    .et_captured, .et_lost, .et_sent, .ep_running, .et_running);

  // ADC models: TPC pulses every 150 samples, FT pulses every 100 samples
  // with a second pulse 12 samples later in every third period
  for (genvar b = 0; b < NEP; b++) begin : g_epm
    for (genvar c = 0; c < NCH; c++) begin : g_ch
      logic [11:0] v, s; int n; logic lk, fr;
      ads5282_model m (.value(v), .lclk(lk), .frame(fr), .d_rise(ep_d_rise[b][c]), .d_fall(ep_d_fall[b][c]), .sent(s), .sent_no(n));
      always @(n) v = ((n + 37 * b + 11 * c) % 150 < 4) ? 12'd3000 : 12'd200;
      if (c == 0) begin : g_clk
        assign ep_lclk[b] = lk; assign ep_frame[b] = fr;
      end
    end
  end
  for (genvar b = 0; b < NET; b++) begin : g_etm
    for (genvar c = 0; c < NCH; c++) begin : g_ch
      logic [11:0] v, s; int n; logic lk, fr;
      ads5282_model m (.value(v), .lclk(lk), .frame(fr), .d_rise(et_d_rise[b][c]), .d_fall(et_d_fall[b][c]), .sent(s), .sent_no(n));
      always @(n) v = (((n + 7 * b + 3 * c) % 100 < 3) ||
                       ((n % 300) >= 12 && (n % 300) < 15)) ? 12'd2800 : 12'd150;
      if (c == 0) begin : g_clk
        assign et_lclk[b] = lk; assign et_frame[b] = fr;
      end
    end
  end

  // output FIFO readers
  word_t outq [5][$];
  logic stall = 0;
  always @(negedge clk) begin
    for (int i = 0; i < 5; i++) out_rd[i] = !(stall && (i == 0 || i == 1));
  end
  always @(posedge clk) if (!rst)
    for (int i = 0; i < 5; i++) if (out_rd[i] && out_valid[i]) outq[i].push_back(out_data[i]);

  // mechanism monitors
  int m_hold_on, m_hold_off, m_slave_busy, m_ep_hold;
  initial begin m_hold_on = 0; m_hold_off = 0; m_slave_busy = 0; m_ep_hold = 0; end
  logic hold_q = 0, sb_q = 0;
  always @(posedge clk) if (!rst) begin
    hold_q <= dut.g_ep[0].u_ep.hold;
    if (dut.g_ep[0].u_ep.hold && !hold_q) m_hold_on++;
    if (!dut.g_ep[0].u_ep.hold && hold_q) m_hold_off++;
    sb_q <= ccb_busy[1];
    if (ccb_busy[1] && !sb_q) m_slave_busy++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic mech(input string name, input int n);
    $display("mechanism %-22s %0d", name, n);
    chk(n > 0, {"mechanism never happened: ", name});
  endtask

  initial begin
    #5ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int ev_got [2];     // 0 = TPC, 1 = FT
  int ev_bad, pk_bad;
  // parse the packets of one output; SP payloads are concatenated per SP and
  // then parsed as event streams
  task automatic parse(input int o);
    int k, n, sp;
    word_t sum;
    word_t st [13][$];
    k = 0;
    while (k < outq[o].size()) begin
      if (k + 11 > outq[o].size()) begin pk_bad++; break; end
      sp = int'(outq[o][k][11:8]); n = int'(outq[o][k+6]);
      if (outq[o][k][15:12] != 4'hA || k + 11 + n > outq[o].size()) begin pk_bad++; break; end
      sum = 0;
      for (int i = 0; i < 10 + n; i++) sum += outq[o][k+i];
      if (outq[o][k+10+n] != sum) pk_bad++;
      for (int i = 0; i < n; i++) st[sp].push_back(outq[o][k+7+i]);
      k += 11 + n;
    end
    for (int s = 0; s < 12; s++) begin
      int j, len;
      j = 0;
      while (j < st[s].size()) begin
        if (st[s][j][15:14] != 2'b11 || j + 5 > st[s].size()) begin ev_bad++; break; end
        len = int'(st[s][j+1][11:0]);
        if (len != ((o == 0) ? EPLEN : ETLEN) || j + 5 + len > st[s].size()) begin ev_bad++; break; end
        ev_got[o == 0 ? 0 : 1]++;
        j += 5 + len;
      end
    end
    // the 13th stream of the Master: 3-word trigger records
    if (o == 0 && st[12].size() != 3 * int'(n_tr)) begin
      $display("trigger records: %0d words for %0d requests", st[12].size(), n_tr);
      pk_bad++;
    end
  endtask

  initial begin
    int ep_ev, ep_dr, ep_ig, et_lo, et_se, et_ca, holds, busy_rej0;
    for (int b = 0; b < NEP; b++) begin
      ep_cfg[b] = '{amp_thr: 12'd1000, miw_width: 7'd8, miw_thr: 15'd8000, delay: 10'd20, len: 12'(EPLEN)};
      for (int c = 0; c < NCH; c++) ep_tr_mode[b][c] = (b == 0 && c == 0) ? TR_AMP : TR_OFF;
    end
    for (int b = 0; b < NET; b++)
      et_cfg[b] = '{thr: 12'd1000, delay: 10'd5, len: 12'(ETLEN), window: 16'd3000};
    repeat (5) @(posedge clk); rst <= 0;
    repeat (20) @(negedge clk);
    host_cmd_valid = 1; host_cmd = CMD_START_RUN;
    @(posedge clk); #1; while (!host_cmd_ready) begin @(posedge clk); #1; end
    host_cmd_valid = 0;
    repeat (200) @(negedge clk);
    for (int b = 0; b < NEP; b++) chk(ep_running[b], "TPC board running");
    for (int b = 0; b < NET; b++) chk(et_running[b], "FT board running");
    // phase 1: free flow
    repeat (30000) @(negedge clk);
    // phase 2: stall the outputs of the Master and Slave 0
    busy_rej0 = n_busy_rej;
    stall = 1;
    repeat (40000) @(negedge clk);
    stall = 0;
    repeat (20000) @(negedge clk);
    // phase 3: no more triggers; drain
    ep_tr_mode[0][0] = TR_OFF;
    repeat (60000) @(negedge clk);
    ep_ev = 0; ep_dr = 0; ep_ig = 0; et_lo = 0; et_se = 0; et_ca = 0; holds = 0;
    for (int b = 0; b < NEP; b++) for (int c = 0; c < NCH; c++) begin
      ep_ev += ep_events[b][c]; ep_dr += ep_dropped[b][c]; ep_ig += ep_ignored[b][c];
    end
    for (int b = 0; b < NET; b++) for (int c = 0; c < NCH; c++) begin
      et_lo += et_lost[b][c]; et_se += et_sent[b][c]; et_ca += et_captured[b][c];
    end
    for (int o = 0; o < 5; o++) for (int p = 0; p < 12; p++) holds += ccb_holds[o][p];
    ev_got = '{0, 0}; ev_bad = 0; pk_bad = 0;
    for (int o = 0; o < 5; o++) parse(o);
    chk(pk_bad == 0, $sformatf("%0d bad packets", pk_bad));
    chk(ev_bad == 0, $sformatf("%0d bad events", ev_bad));
    chk(ev_got[0] == ep_ev, $sformatf("TPC events received %0d, recorded %0d", ev_got[0], ep_ev));
    chk(ev_got[1] == et_se, $sformatf("FT events received %0d, sent %0d", ev_got[1], et_se));
    for (int o = 0; o < 5; o++) chk(out_count[o] == 0, "output FIFO drained");
    mech("trigger", n_trig);
    mech("ignored trigger", ep_ig);
    mech("dropped event", ep_dr);
    mech("hold (SP count)", holds);
    mech("hold on TPC board 0", m_hold_on);
    mech("resume on TPC board 0", m_hold_off);
    mech("busy Slave", m_slave_busy);
    mech("busy rejection", n_busy_rej - busy_rej0);
    mech("FT self-trigger", et_ca);
    mech("FT lost self-trigger", et_lo);
    mech("FT window reload", et_se);
    for (int o = 0; o < 5; o++) mech($sformatf("packets on CCB %0d", o), ccb_packets[o]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
