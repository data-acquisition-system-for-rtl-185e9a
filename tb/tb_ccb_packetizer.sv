// Self-checking testbench of ccb_packetizer with three sources and
// PKT_MAX = 16: sources hold random amounts of data; the output is parsed
// packet by packet and checked for header fields (source number, kilo-word
// fields, packet number per source, timestamp, length), payload order per
// source, splitting into packets of at most 16 words, trailer timestamp and
// checksum; a full output FIFO must stop packet building.
module tb_ccb_packetizer;
  timeunit 1ns; timeprecision 1ps;
  import proton_pkg::*;
  localparam int NS = 3;
  logic clk = 0, rst = 1;
  always #5ns clk = ~clk;
  int checks = 0, failures = 0;
  ts_t ts = 0;
  logic [NS-1:0] src_valid, src_rd;
  word_t src_data [NS];
  logic [15:0] src_count [NS];
  logic [15:0] out_free = 16'd4096, out_count = 0, n_packets;
  logic wr_en;
  word_t wr_data;
  ccb_packetizer #(.NSRC(NS), .PKT_MAX(16)) dut (.*);

  word_t q[NS][$], exp_q[NS][$], outq[$];
  always @(negedge clk)
    for (int s = 0; s < NS; s++) begin
      src_valid[s] = q[s].size() > 0;
      src_data[s]  = (q[s].size() > 0) ? q[s][0] : '0;
      src_count[s] = 16'(q[s].size());
    end
  always @(posedge clk) begin
    ts <= ts + 1;
    if (!rst) begin
      for (int s = 0; s < NS; s++) if (src_rd[s] && src_valid[s]) void'(q[s].pop_front());
      if (wr_en) outq.push_back(wr_data);
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int pkt_no[NS] = '{0, 0, 0};
    int lens[NS] = '{40, 5, 0};
    int npk = 0, k = 0;
    for (int s = 0; s < NS; s++)
      for (int i = 0; i < lens[s]; i++) begin
        word_t w; w = word_t'($urandom);
        q[s].push_back(w); exp_q[s].push_back(w);
      end
    // no room: nothing may be written
    out_free = 16'd10;
    repeat (3) @(posedge clk); rst <= 0;
    repeat (50) @(posedge clk);
    chk(outq.size() == 0, "waits for output space");
    @(negedge clk); out_free = 16'd4096;
    repeat (400) @(posedge clk);
    // parse
    while (k < outq.size()) begin
      int sp, n, first;
      word_t sum;
      ts_t th, tt;
      first = k; sum = 0;
      sp = int'(outq[k][11:8]);
      chk(outq[k][15:12] == 4'hA && sp < NS, "header marker");
      if (!(sp < NS)) break;
      chk(outq[k+2] == 16'(pkt_no[sp]), $sformatf("packet number sp%0d", sp));
      pkt_no[sp]++;
      th = {outq[k+3][11:0], outq[k+4], outq[k+5]};
      n = int'(outq[k+6]);
      chk(n >= 1 && n <= 16, $sformatf("payload length %0d", n));
      for (int i = 0; i < n; i++)
        chk(exp_q[sp].size() > 0 && outq[k+7+i] == exp_q[sp].pop_front(), "payload");
      tt = {outq[k+7+n][11:0], outq[k+8+n], outq[k+9+n]};
      chk(tt > th && th < ts, "timestamps");
      for (int i = first; i < k + 10 + n; i++) sum += outq[i];
      chk(outq[k+10+n] == sum, "checksum");
      k += 11 + n;
      npk++;
    end
    chk(npk == 4 && n_packets == 4, $sformatf("packets %0d", npk));   // 16+16+8 and 5
    for (int s = 0; s < NS; s++) chk(exp_q[s].size() == 0, "all data packed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
