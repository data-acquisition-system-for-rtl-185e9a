// Self-checking testbench of dig_sp: a concentrator-side transmitter and
// receiver talk to the port. Commands must come out as single pulses; the
// data stream must arrive complete and in order; after "hold" no new word
// may start, and after "resume" the stream continues.
module tb_dig_sp;
  timeunit 1ns; timeprecision 1ps;
  import proton_pkg::*;
  logic clk = 0, rst = 1;
  always #5ns clk = ~clk;
  int checks = 0, failures = 0;
  logic sdi, sdo, data_valid, data_ready, start_run, stop_run, trigger, hold;
  word_t data_word;
  logic c_valid = 0, c_ready, r_valid, r_cmd;
  word_t c_word = 0, r_word;
  word_t src[$], rcv[$], orig[$];
  int n_start = 0, n_stop = 0, n_trig = 0, n_in_hold = 0;

  dig_sp dut (.*);
  sl_tx u_ctx (.clk, .rst, .cmd_valid(c_valid), .cmd_word(c_word), .cmd_ready(c_ready),
               .data_valid(1'b0), .data_word('0), .data_ready(), .sdo(sdi));
  sl_rx u_crx (.clk, .rst, .sdi(sdo), .valid(r_valid), .is_cmd(r_cmd), .word(r_word), .frame_err());

  // queue head presented on the port, refreshed after every change
  task automatic upd();
    data_valid = src.size() > 0;
    data_word  = data_valid ? src[0] : '0;
  endtask

  always @(posedge clk) if (!rst) begin
    if (data_valid && data_ready) begin
      void'(src.pop_front());
      if (hold) n_in_hold++;
    end
    if (r_valid) rcv.push_back(r_word);
    n_start += start_run; n_stop += stop_run; n_trig += trigger;
  end
  always @(negedge clk) upd();

  task automatic send(input cmd_e c);
    @(negedge clk); c_valid = 1; c_word = {8'h00, c};
    @(posedge clk); #1; while (!c_ready) begin @(posedge clk); #1; end
    c_valid = 0;
  endtask

  initial begin
    #2ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int sent_before;
    for (int i = 0; i < 300; i++) src.push_back(word_t'($urandom));
    orig = src;
    upd();
    repeat (3) @(posedge clk); rst <= 0;
    send(CMD_START_RUN); send(CMD_TRIGGER); send(CMD_TRIGGER); send(CMD_STOP_RUN);
    repeat (30) @(posedge clk);
    checks++; if (n_start != 1 || n_stop != 1 || n_trig != 2) begin failures++; $display("FAIL command pulses"); end
    repeat (500) @(posedge clk);
    send(CMD_HOLD);
    repeat (25) @(posedge clk);
    sent_before = src.size();
    repeat (400) @(posedge clk);
    checks++; if (src.size() != sent_before || !hold) begin failures++; $display("FAIL hold"); end
    send(CMD_RESUME);
    wait (src.size() == 0);
    repeat (40) @(posedge clk);
    checks++; if (rcv.size() != 300) begin failures++; $display("FAIL received %0d", rcv.size()); end
    checks++; if (rcv != orig) begin failures++; $display("FAIL data order"); end
    checks++; if (n_in_hold != 0) begin failures++; $display("FAIL word sent while held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
