// Self-checking testbench of adc_deser with the ADS5282 model: random
// readings must come out of the deserializer in order and unchanged, one
// strobe per 40 ns frame (25 MSPS).
module tb_adc_deser;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1;
  always #5ns clk = ~clk;
  int checks = 0, failures = 0;
  logic [11:0] value, sent, sample;
  logic lclk, frame, d_rise, d_fall, sample_valid;
  int sent_no;
  logic [11:0] exp_q[$];
  int n_out = 0;
  realtime t0, t1;

  ads5282_model #(.HALF_PS(3333)) adc (.*);
  adc_deser dut (.lclk, .d_rise, .d_fall, .frame, .clk, .rst, .sample_valid, .sample);

  always @(sent_no) begin
    value = 12'($urandom);
    if (sent_no >= 13) exp_q.push_back(sent);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200us; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    value = 0;
    repeat (5) @(posedge clk); rst <= 0;
    // align: drop deserializer outputs until the first referenced word
    wait (exp_q.size() > 0);
    @(posedge clk);
    while (n_out < 500) begin
      @(posedge clk);
      if (sample_valid) begin
        if (n_out == 0) begin
          // wait for the first referenced word (the ADC pipeline starts empty)
          if (exp_q.size() == 0 || exp_q[0] != sample) continue;
          t0 = $realtime;
        end
        chk(exp_q.size() > 0 && sample == exp_q[0], $sformatf("word %0d got %h exp %h q=%0d", n_out, sample, exp_q[0], exp_q.size()));
        if (exp_q.size() > 0) void'(exp_q.pop_front());
        n_out++;
        t1 = $realtime;
      end
    end
    // 499 intervals of 6 bit-clock periods
    chk((t1 - t0) > 499 * 39.0ns && (t1 - t0) < 499 * 41.0ns, "sample rate");
    chk(exp_q.size() <= 2, "latency bounded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
