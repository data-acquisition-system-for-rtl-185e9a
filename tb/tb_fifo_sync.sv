// Self-checking testbench of fifo_sync: random writes and reads against a
// queue model, fill to full and drain to empty; checks data order, count,
// full, empty and free.
module tb_fifo_sync;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int D = 16;
  logic wr_en = 0, rd_en = 0, empty, full;
  logic [16:0] din = 0, dout;
  logic [4:0] count, free;
  logic [16:0] q[$];

  fifo_sync #(.DEPTH(D), .W(17)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      chk(count == 5'(q.size()), "count");
      chk(free == 5'(D - q.size()), "free");
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == D), "full");
      if (q.size() > 0) chk(dout == q[0], "data");
      wr_en = (i < 1000) ? ($urandom % 4 != 0) : (i < 2000) ? ($urandom % 4 == 0) : ($urandom % 2);
      rd_en = (i < 1000) ? ($urandom % 4 == 0) : (i < 2000) ? ($urandom % 4 != 0) : ($urandom % 2);
      if (full) wr_en = 0;
      if (empty) rd_en = 0;
      din = 17'($urandom);
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
