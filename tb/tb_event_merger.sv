// Self-checking testbench of event_merger with four sources holding events of
// random length and a randomly stalling sink: every word arrives, in order
// per source, and the words of one event are never interleaved with another.
module tb_event_merger;
  timeunit 1ns; timeprecision 1ps;
  import proton_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst = 1;
  always #5ns clk = ~clk;
  int checks = 0, failures = 0;
  logic [N-1:0] src_valid, src_last, src_ready;
  word_t src_data [N];
  logic out_valid, out_last, out_ready = 0;
  word_t out_data;
  typedef struct { word_t d; bit l; } w_t;
  w_t q [N][$];
  w_t exp_q [N][$];
  int cur_src = -1, n_words = 0, n_events = 0;
  event_merger #(.N(N)) dut (.*);

  task automatic upd();
    for (int s = 0; s < N; s++) begin
      src_valid[s] = q[s].size() > 0;
      src_data[s]  = (q[s].size() > 0) ? q[s][0].d : '0;
      src_last[s]  = (q[s].size() > 0) ? q[s][0].l : 1'b0;
    end
  endtask

  always @(posedge clk) if (!rst) begin
    for (int s = 0; s < N; s++)
      if (src_ready[s] && src_valid[s]) void'(q[s].pop_front());
    if (out_valid && out_ready) begin
      int s;
      s = int'(out_data[15:12]);
      checks++;
      if (cur_src >= 0 && s != cur_src) begin failures++; $display("FAIL interleaved"); end
      cur_src = out_last ? -1 : s;
      if (exp_q[s].size() == 0 || exp_q[s][0].d != out_data || exp_q[s][0].l != out_last) begin
        failures++; $display("FAIL data from %0d got %h exp %h n=%0d", s, out_data, exp_q[s].size() ? exp_q[s][0].d : 16'hdead, n_words);
      end
      if (exp_q[s].size() > 0) void'(exp_q[s].pop_front());
      n_words++;
      if (out_last) n_events++;
    end
    out_ready <= ($urandom % 4 != 0);
  end
  always @(negedge clk) upd();

  initial begin
    #1ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int total = 0;
    for (int s = 0; s < N; s++)
      for (int e = 0; e < 10; e++) begin
        int len;
        len = 1 + $urandom % 20;
        for (int i = 0; i < len; i++) begin
          w_t w;
          w.d = {4'(s), 12'($urandom)}; w.l = (i == len - 1);
          q[s].push_back(w); exp_q[s].push_back(w); total++;
        end
      end
    upd();
    repeat (3) @(posedge clk); rst <= 0;
    wait (n_words == total);
    repeat (5) @(posedge clk);
    checks++;
    if (n_events != 4 * 10) begin failures++; $display("FAIL event count"); end
    for (int s = 0; s < N; s++) begin
      checks++;
      if (exp_q[s].size() != 0) begin failures++; $display("FAIL leftover"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
