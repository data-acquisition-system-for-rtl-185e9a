// ads5282_model: behavioural model of one ADS5282 channel for testbenches
// (not synthesizable). It produces the bit clock (6x the sample rate), the
// frame clock and the double-data-rate serial bits of 12-bit readings, MSB
// first, as the FPGA's DDR input flip-flops would present them: d_rise and
// d_fall change on the falling edge of lclk and are sampled on its rising
// edge. The reading put on the line at conversion n is the `value` input
// taken 12 conversions earlier (the ADC's 12-cycle output latency). `sent`
// and `sent_no` show the word now on the line for reference checks.
module ads5282_model #(
  parameter int HALF_PS = 3333
) (
  input  logic [11:0] value,
  output logic        lclk,
  output logic        frame,
  output logic        d_rise,
  output logic        d_fall,
  output logic [11:0] sent,
  output int          sent_no
);
  timeunit 1ns; timeprecision 1ps;
  logic [11:0] pipe [12];
  int          ph;

  initial begin
    lclk = 0; frame = 0; d_rise = 0; d_fall = 0; sent = 0; sent_no = -1; ph = 5;
    foreach (pipe[i]) pipe[i] = 0;
    forever begin
      #(HALF_PS * 1ps) lclk = 1;
      #(HALF_PS * 1ps) lclk = 0;
      ph = (ph + 1) % 6;
      if (ph == 0) begin
        sent = pipe[11];
        for (int i = 11; i > 0; i--) pipe[i] = pipe[i-1];
        pipe[0] = value;
        sent_no++;
      end
      frame  = (ph < 3);
      d_rise = sent[11 - 2*ph];
      d_fall = sent[10 - 2*ph];
    end
  end
endmodule
