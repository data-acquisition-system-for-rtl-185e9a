// Self-checking testbench of a Master ccb12 with four SPs (three digitizers,
// one Slave) and small FIFOs. Checks: host "start run" and Master-made
// "trigger" reach every SP; a trigger request during a Slave's busy is
// refused and recorded as unused; data sent by the digitizer models come out
// of the output FIFO in packets of the right SP, in order and with correct
// checksums; the trigger records arrive as the extra stream (SP number 4).
module tb_ccb12;
  timeunit 1ns; timeprecision 1ps;
  import proton_pkg::*;
  localparam int NSP = 4;
  logic clk = 0, rst = 1;
  always #5ns clk = ~clk;
  int checks = 0, failures = 0;
  logic usp_sdo, host_cmd_valid = 0, host_cmd_ready, tp_tr = 0, out_valid, out_rd, running, busy;
  cmd_e host_cmd = CMD_NOP;
  logic [NSP-1:0] sp_sdo, sp_sdi;
  word_t out_data;
  logic [10:0] out_count;
  logic [15:0] n_holds [NSP], n_packets, n_tr, n_trig, n_busy_rej;

  ccb12 #(.MASTER(1'b1), .NSP(NSP), .IN_FIFO(256), .OUT_FIFO(1024), .PKT_MAX(64)) dut (
    .clk, .rst, .usp_sdi(1'b0), .usp_sdo, .host_cmd_valid, .host_cmd, .host_cmd_ready,
    .tp_tr, .min_gap(32'd50), .sp_slave(4'b1000), .sp_sdo, .sp_sdi,
    .out_valid, .out_data, .out_rd, .out_count, .running, .busy,
    .n_holds, .n_packets, .n_tr, .n_trig, .n_busy_rej);

  // device models
  logic [NSP-1:0] d_valid, d_cmd, t_cv, t_cr, t_dv, t_dr;
  word_t d_word [NSP], t_cw [NSP], t_dw [NSP];
  word_t src [NSP][$], exp_q [NSP+1][$];
  int n_cmd [NSP][8];
  for (genvar i = 0; i < NSP; i++) begin : g_dev
    sl_rx u_rx (.clk, .rst, .sdi(sp_sdo[i]), .valid(d_valid[i]), .is_cmd(d_cmd[i]), .word(d_word[i]), .frame_err());
    sl_tx u_tx (.clk, .rst, .cmd_valid(t_cv[i]), .cmd_word(t_cw[i]), .cmd_ready(t_cr[i]),
                .data_valid(t_dv[i]), .data_word(t_dw[i]), .data_ready(t_dr[i]), .sdo(sp_sdi[i]));
  end
  always @(negedge clk)
    for (int i = 0; i < NSP; i++) begin
      t_dv[i] = src[i].size() > 0;
      t_dw[i] = (src[i].size() > 0) ? src[i][0] : '0;
    end
  word_t outq[$];
  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < NSP; i++) begin
      if (t_dv[i] && t_dr[i]) void'(src[i].pop_front());
      if (d_valid[i] && d_cmd[i] && d_word[i][7:0] < 8) n_cmd[i][d_word[i][2:0]]++;
    end
    if (out_rd && out_valid) outq.push_back(out_data);
  end
  assign out_rd = 1'b1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic host(input cmd_e c);
    @(negedge clk); host_cmd_valid = 1; host_cmd = c;
    @(posedge clk); #1; while (!host_cmd_ready) begin @(posedge clk); #1; end
    host_cmd_valid = 0;
  endtask
  task automatic slave_status(input cmd_e c);
    @(negedge clk); t_cv[3] = 1; t_cw[3] = {8'h00, c};
    @(posedge clk); #1; while (!t_cr[3]) begin @(posedge clk); #1; end
    t_cv[3] = 0;
    repeat (30) @(negedge clk);
  endtask
  task automatic tr_pulse();
    @(negedge clk); tp_tr = 1; repeat (4) @(negedge clk); tp_tr = 0;
    repeat (100) @(negedge clk);
  endtask

  initial begin
    #3ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int k = 0;
    t_cv = '0;
    foreach (t_cw[i]) t_cw[i] = '0;
    foreach (n_cmd[i, j]) n_cmd[i][j] = 0;
    repeat (5) @(posedge clk); rst <= 0;
    host(CMD_START_RUN);
    repeat (40) @(negedge clk);
    chk(running, "Master running");
    for (int i = 0; i < NSP; i++) chk(n_cmd[i][CMD_START_RUN] == 1, $sformatf("start on SP%0d", i));
    tr_pulse();
    for (int i = 0; i < NSP; i++) chk(n_cmd[i][CMD_TRIGGER] == 1, $sformatf("trigger on SP%0d", i));
    slave_status(CMD_BUSY_ON);
    chk(busy, "Slave busy seen");
    tr_pulse();
    chk(n_trig == 1 && n_busy_rej == 1, "trigger refused while busy");
    slave_status(CMD_BUSY_OFF);
    tr_pulse();
    chk(n_trig == 2 && n_tr == 3, "trigger after busy cleared");
    // data from three digitizers
    for (int i = 0; i < 3; i++)
      for (int w = 0; w < 100 + 30 * i; w++) begin
        word_t x; x = word_t'($urandom);
        src[i].push_back(x); exp_q[i].push_back(x);
      end
    repeat (6000) @(negedge clk);
    // parse packets
    while (k + 11 <= outq.size()) begin
      int sp, n;
      word_t sum;
      sp = int'(outq[k][11:8]); n = int'(outq[k+6]);
      sum = 0;
      for (int i = 0; i < 10 + n; i++) sum += outq[k+i];
      chk(outq[k][15:12] == 4'hA && sp <= NSP && k + 11 + n <= outq.size(), "packet header");
      if (!(sp <= NSP && k + 11 + n <= outq.size())) break;
      chk(outq[k+10+n] == sum, "checksum");
      for (int i = 0; i < n; i++) begin
        if (sp < NSP) chk(exp_q[sp].size() > 0 && outq[k+7+i] == exp_q[sp].pop_front(), "payload");
        else exp_q[NSP].push_back(outq[k+7+i]);
      end
      k += 11 + n;
    end
    for (int i = 0; i < 3; i++) chk(exp_q[i].size() == 0, $sformatf("all data of SP%0d", i));
    chk(exp_q[NSP].size() == 9, $sformatf("trigger records %0d words", exp_q[NSP].size()));
    if (exp_q[NSP].size() == 9)
      chk(exp_q[NSP][0][15:12] == 4'hF && exp_q[NSP][3][15:12] == 4'hE && exp_q[NSP][6][15:12] == 4'hF,
          "used flags of the records");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
