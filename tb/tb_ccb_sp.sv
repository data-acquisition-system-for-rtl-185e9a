// Self-checking testbench of ccb_sp with a 64-word input FIFO: a digitizer
// model (transmitter that obeys hold/resume) streams data; the testbench
// checks that broadcast commands reach the digitizer side, that "hold" is
// sent when the FIFO passes 3/4 and "resume" when it drains below 1/4, that
// no word is lost and the order is kept; then, as a Slave-facing port, that
// busy-on/busy-off status frames set and clear slave_busy.
module tb_ccb_sp;
  timeunit 1ns; timeprecision 1ps;
  import proton_pkg::*;
  logic clk = 0, rst = 1;
  always #5ns clk = ~clk;
  int checks = 0, failures = 0;
  logic slave_port = 0, sdo, sdi, bc_valid = 0, bc_ready, rd_valid, rd_en = 0, held, slave_busy;
  word_t bc_word = 0, rd_data;
  logic [6:0] count;
  logic [15:0] n_holds;
  ccb_sp #(.DEPTH(64)) dut (.*);

  // device side
  logic d_valid, d_cmd, d_hold = 0, t_dv, t_dr, t_cv = 0, t_cr;
  word_t d_word, t_dw, t_cw = 0;
  word_t src[$], orig[$], got[$];
  int n_trig = 0, n_hold_cmd = 0, n_resume_cmd = 0, max_count = 0;
  sl_rx u_drx (.clk, .rst, .sdi(sdo), .valid(d_valid), .is_cmd(d_cmd), .word(d_word), .frame_err());
  sl_tx u_dtx (.clk, .rst, .cmd_valid(t_cv), .cmd_word(t_cw), .cmd_ready(t_cr),
               .data_valid(t_dv), .data_word(t_dw), .data_ready(t_dr), .sdo(sdi));

  always @(negedge clk) begin
    t_dv = src.size() > 0 && !d_hold;
    t_dw = (src.size() > 0) ? src[0] : '0;
  end
  always @(posedge clk) if (!rst) begin
    if (t_dv && t_dr) void'(src.pop_front());
    if (d_valid && d_cmd) begin
      if (d_word[7:0] == CMD_TRIGGER) n_trig++;
      if (d_word[7:0] == CMD_HOLD)   begin d_hold <= 1; n_hold_cmd++; end
      if (d_word[7:0] == CMD_RESUME) begin d_hold <= 0; n_resume_cmd++; end
    end
    if (rd_en && rd_valid) got.push_back(rd_data);
    if (int'(count) > max_count) max_count = int'(count);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #5ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) src.push_back(word_t'($urandom));
    orig = src;
    repeat (3) @(posedge clk); rst <= 0;
    // broadcast
    @(negedge clk); bc_valid = 1; bc_word = {8'h00, CMD_TRIGGER};
    @(posedge clk); #1; while (!bc_ready) begin @(posedge clk); #1; end
    bc_valid = 0;
    // let the FIFO fill without reading
    repeat (3000) @(negedge clk);
    chk(n_trig == 1, "broadcast reached device");
    chk(held && n_hold_cmd == 1 && n_holds == 1, "hold sent at 3/4");
    chk(max_count > 48 && max_count < 64, $sformatf("fill stopped at %0d", max_count));
    // drain
    for (int pass = 0; pass < 2; pass++) begin
      while (src.size() > 0 || rd_valid) begin
        @(negedge clk); rd_en = ($urandom % 2);
      end
      @(negedge clk); rd_en = 0;
      repeat (60) @(negedge clk);        // words still on the line
    end
    chk(n_resume_cmd >= 1, "resume sent");
    chk(got == orig, $sformatf("data intact (%0d of %0d)", got.size(), orig.size()));
    // slave-facing port: busy status
    slave_port = 1;
    @(negedge clk); t_cv = 1; t_cw = {8'h00, CMD_BUSY_ON};
    @(posedge clk); #1; while (!t_cr) begin @(posedge clk); #1; end
    t_cv = 0;
    repeat (40) @(negedge clk);
    chk(slave_busy, "busy on");
    @(negedge clk); t_cv = 1; t_cw = {8'h00, CMD_BUSY_OFF};
    @(posedge clk); #1; while (!t_cr) begin @(posedge clk); #1; end
    t_cv = 0;
    repeat (40) @(negedge clk);
    chk(!slave_busy, "busy off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
