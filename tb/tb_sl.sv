// Self-checking testbench of the serial link (sl_tx -> sl_rx): random command
// and data words are offered together; checks that every word arrives intact
// with its type, that commands go before waiting data, that a word takes 20
// clock cycles, and that a corrupted frame is rejected.
module tb_sl;
  timeunit 1ns; timeprecision 1ps;
  import proton_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic cmd_valid = 0, data_valid = 0, cmd_ready, data_ready, sdo, line, flip = 0;
  word_t cmd_word = 0, data_word = 0, word;
  logic valid, is_cmd, frame_err;
  typedef struct { logic c; word_t w; } item_t;
  item_t exp_q[$];
  int n_rx = 0, n_err = 0;
  longint t_first = -1, t_last = 0, cyc = 0;

  sl_tx u_tx (.*);
  assign line = sdo ^ flip;
  sl_rx u_rx (.clk, .rst, .sdi(line), .valid, .is_cmd, .word, .frame_err);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (!rst) begin
    cyc++;
    if (cmd_valid && cmd_ready)   exp_q.push_back('{1'b1, cmd_word});
    if (data_valid && data_ready) exp_q.push_back('{1'b0, data_word});
    if (cmd_ready && data_ready) begin checks++; failures++; $display("FAIL both ready"); end
    if (data_ready && cmd_valid) begin checks++; failures++; $display("FAIL data before cmd"); end
    if (frame_err) n_err++;
    if (valid) begin
      item_t e;
      n_rx++;
      if (t_first < 0) t_first = cyc;
      t_last = cyc;
      chk(exp_q.size() > 0, "unexpected word");
      if (exp_q.size() > 0) begin
        e = exp_q.pop_front();
        chk(e.c == is_cmd && e.w == word, $sformatf("word/type exp %0d %h got %0d %h t=%0t", e.c, e.w, is_cmd, word, $time));
      end
    end
  end

  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      if (!cmd_valid && ($urandom % 5 == 0)) begin cmd_valid = 1; cmd_word = word_t'($urandom); end
      if (!data_valid) begin data_valid = 1; data_word = word_t'($urandom); end
      @(posedge clk); #1;
      if (cmd_ready) cmd_valid = 0;
      if (data_ready) data_valid = 0;
      while (!(cmd_ready || data_ready) && (cmd_valid || data_valid)) begin
        @(posedge clk); #1;
        if (cmd_ready) cmd_valid = 0;
        if (data_ready) data_valid = 0;
      end
    end
    @(negedge clk); cmd_valid = 0; data_valid = 0;
    repeat (40) @(posedge clk);
    chk(exp_q.size() == 0, "all words delivered");
    chk(n_rx >= 400, "word count");
    // back-to-back words: 20 cycles each
    chk((t_last - t_first) == longint'(20 * (n_rx - 1)), $sformatf("rate %0d over %0d", t_last - t_first, n_rx));
    chk(n_err == 0, "no frame errors");
    // corrupt one payload bit
    @(negedge clk); data_valid = 1; data_word = 16'h1234;
    @(posedge clk); #1; data_valid = 0;
    repeat (5) @(posedge clk);
    @(negedge clk); flip = 1; @(negedge clk); flip = 0;
    repeat (30) @(posedge clk);
    chk(n_err == 1, "parity error detected");
    chk(exp_q.size() == 1, "corrupt word not delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
