// Self-checking testbench of the acquisition tree at its full default size
// (4 ASF12eP with 12 channels, 48 ASF48et with 48 channels, full FIFOs and
// rings). One ADC model per board drives the board's clocks and its channel
// 0; the other channels read zero. One complete operation is run: start
// run, a TPC pulse on board 0 channel 0 that makes one trigger, and the
// readout of all boards. Expected: exactly one trigger; 48 TPC events of the
// configured length at the Master's output, one per channel with channel
// numbers 0..47; on the Slaves, as many FT events as the boards report sent,
// each of the configured length; correct packet checksums everywhere.
module tb_proton_daq_full;
  timeunit 1ns; timeprecision 1ps;
  import proton_pkg::*;
  localparam int NEP = 4, NET = 48, EPN = 12, ETN = 48, EPLEN = 100, ETLEN = 80;
  logic clk = 0, rst = 1;
  always #5ns clk = ~clk;
  int checks = 0, failures = 0;

  logic ep_lclk [NEP], ep_frame [NEP];
  logic [EPN-1:0] ep_d_rise [NEP], ep_d_fall [NEP];
  ep_cfg_t ep_cfg [NEP];
  tr_mode_e ep_tr_mode [NEP][EPN];
  logic et_lclk [NET], et_frame [NET];
  logic [ETN-1:0] et_d_rise [NET], et_d_fall [NET];
  et_cfg_t et_cfg [NET];
  logic host_cmd_valid = 0, host_cmd_ready;
  cmd_e host_cmd = CMD_NOP;
  logic out_valid [5], out_rd [5], ccb_busy [5];
  word_t out_data [5];
  logic [15:0] out_count [5];
  logic [15:0] ccb_packets [5], ccb_holds [5][12], n_tr, n_trig, n_busy_rej;
  logic [15:0] ep_events [NEP][EPN], ep_dropped [NEP][EPN], ep_ignored [NEP][EPN];
  logic [15:0] et_captured [NET][ETN], et_lost [NET][ETN], et_sent [NET][ETN];
  logic ep_running [NEP], et_running [NET];

  proton_daq dut (
    .clk, .rst, .ep_lclk, .ep_frame, .ep_d_rise, .ep_d_fall, .ep_cfg, .ep_tr_mode,
    .et_lclk, .et_frame, .et_d_rise, .et_d_fall, .et_cfg,
    .host_cmd_valid, .host_cmd, .host_cmd_ready, .min_gap(32'd100),
    .out_valid, .out_data, .out_rd, .out_count, .ccb_busy, .ccb_packets, .ccb_holds,
    .n_tr, .n_trig, .n_busy_rej, .ep_events, .ep_dropped, .ep_ignored,
    .et_captured, .et_lost, .et_sent, .ep_running, .et_running);

  logic pulse_on = 0;
  for (genvar b = 0; b < NEP; b++) begin : g_epm
    logic [11:0] v, s; int n; logic r, f;
    ads5282_model m (.value(v), .lclk(ep_lclk[b]), .frame(ep_frame[b]), .d_rise(r), .d_fall(f), .sent(s), .sent_no(n));
    always @(n) v = (pulse_on && b == 0 && (n % 2000) < 4) ? 12'd3000 : 12'd200;
    assign ep_d_rise[b] = {{(EPN-1){1'b0}}, r};
    assign ep_d_fall[b] = {{(EPN-1){1'b0}}, f};
  end
  for (genvar b = 0; b < NET; b++) begin : g_etm
    logic [11:0] v, s; int n; logic r, f;
    ads5282_model m (.value(v), .lclk(et_lclk[b]), .frame(et_frame[b]), .d_rise(r), .d_fall(f), .sent(s), .sent_no(n));
    always @(n) v = ((n + 13 * b) % 500 < 3) ? 12'd2800 : 12'd150;
    assign et_d_rise[b] = {{(ETN-1){1'b0}}, r};
    assign et_d_fall[b] = {{(ETN-1){1'b0}}, f};
  end

  word_t outq [5][$];
  always @(negedge clk) for (int i = 0; i < 5; i++) out_rd[i] = 1'b1;
  always @(posedge clk) if (!rst)
    for (int i = 0; i < 5; i++) if (out_rd[i] && out_valid[i]) outq[i].push_back(out_data[i]);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int ev [2], bad, chmask_cnt;
  bit chseen [64];
  task automatic parse(input int o);
    int k, n, sp, j, len;
    word_t sum;
    word_t st [13][$];
    k = 0;
    while (k < outq[o].size()) begin
      if (k + 11 > outq[o].size()) begin bad++; break; end
      sp = int'(outq[o][k][11:8]); n = int'(outq[o][k+6]);
      if (outq[o][k][15:12] != 4'hA || k + 11 + n > outq[o].size()) begin bad++; break; end
      sum = 0;
      for (int i = 0; i < 10 + n; i++) sum += outq[o][k+i];
      if (outq[o][k+10+n] != sum) bad++;
      for (int i = 0; i < n; i++) st[sp].push_back(outq[o][k+7+i]);
      k += 11 + n;
    end
    for (int s = 0; s < 12; s++) begin
      j = 0;
      while (j < st[s].size()) begin
        if (st[s][j][15:14] != 2'b11 || j + 5 > st[s].size()) begin bad++; break; end
        len = int'(st[s][j+1][11:0]);
        if (len != ((o == 0) ? EPLEN : ETLEN) || j + 5 + len > st[s].size()) begin bad++; break; end
        if (o == 0) chseen[st[s][j][13:8]] = 1'b1;
        ev[o == 0 ? 0 : 1]++;
        j += 5 + len;
      end
    end
  endtask

  initial begin
    int et_se;
    for (int b = 0; b < NEP; b++) begin
      ep_cfg[b] = '{amp_thr: 12'd1000, miw_width: 7'd8, miw_thr: 15'd8000, delay: 10'd20, len: 12'(EPLEN)};
      for (int c = 0; c < EPN; c++) ep_tr_mode[b][c] = (b == 0 && c == 0) ? TR_AMP : TR_OFF;
    end
    for (int b = 0; b < NET; b++)
      et_cfg[b] = '{thr: 12'd1000, delay: 10'd10, len: 12'(ETLEN), window: 16'd10000};
    foreach (chseen[i]) chseen[i] = 1'b0;
    repeat (5) @(posedge clk); rst <= 0;
    repeat (20) @(negedge clk);
    host_cmd_valid = 1; host_cmd = CMD_START_RUN;
    @(posedge clk); #1; while (!host_cmd_ready) begin @(posedge clk); #1; end
    host_cmd_valid = 0;
    repeat (200) @(negedge clk);
    for (int b = 0; b < NEP; b++) chk(ep_running[b], "TPC board running");
    for (int b = 0; b < NET; b++) chk(et_running[b], "FT board running");
    // FT boards collect self-triggered events; then one TPC pulse
    repeat (30000) @(negedge clk);
    pulse_on = 1;
    repeat (8000) @(negedge clk);
    pulse_on = 0;
    repeat (50000) @(negedge clk);
    et_se = 0;
    for (int b = 0; b < NET; b++) for (int c = 0; c < ETN; c++) et_se += int'(et_sent[b][c]);
    ev = '{0, 0}; bad = 0;
    for (int o = 0; o < 5; o++) parse(o);
    chmask_cnt = 0;
    for (int i = 0; i < 48; i++) chmask_cnt += int'(chseen[i]);
    chk(n_trig == 1, $sformatf("%0d triggers", n_trig));
    chk(bad == 0, $sformatf("%0d bad packets or events", bad));
    chk(ev[0] == 48 && chmask_cnt == 48, $sformatf("TPC events %0d on %0d channels", ev[0], chmask_cnt));
    chk(et_se > 0 && ev[1] == et_se, $sformatf("FT events %0d received, %0d sent", ev[1], et_se));
    for (int o = 0; o < 5; o++) chk(out_count[o] == 0, "output FIFO drained");
    $display("TPC events %0d, FT events %0d", ev[0], ev[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
