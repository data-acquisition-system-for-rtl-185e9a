// adc_deser: deserializer for one channel of the ADS5282 octal flash ADC.
//
// The ADC sends each 12-bit reading on one LVDS pair as double data rate
// bits at six times the sample clock, framed by a frame clock at the sample
// rate. The DDR input flip-flops of the FPGA (outside this module) present the
// two bits of each bit-clock period as d_rise (earlier bit) and d_fall. A
// 12-bit shift register in the lclk domain takes two bits per period, MSB
// first; the rising edge of the sampled frame clock marks the first pair of a
// new word, so at that edge the register holds the finished previous word.
// That word is held for a whole frame and announced with a toggle, which a
// two-flop synchronizer and edge detector bring into the system clock
// domain: sample_valid pulses for one clk cycle per reading, 3 to 4 clk
// cycles after the frame edge, and becomes the sample strobe of the channel.
// The system clock must be faster than the sample rate. Bit order (MSB first)
// and the toggle hand-over are this design's choices.
module adc_deser
  import proton_pkg::*;
(
  input  logic             lclk,
  input  logic             d_rise,
  input  logic             d_fall,
  input  logic             frame,
  input  logic             clk,
  input  logic             rst,
  output logic             sample_valid,
  output logic [ADC_W-1:0] sample
);
  // ---- bit-clock domain
  logic [ADC_W-1:0] shreg, word_l;
  logic             frame_q, tgl;

  always_ff @(posedge lclk) begin
    if (rst) begin
      shreg   <= '0;
      word_l  <= '0;
      frame_q <= 1'b0;
      tgl     <= 1'b0;
    end else begin
      frame_q <= frame;
      shreg   <= {shreg[ADC_W-3:0], d_rise, d_fall};
      if (frame && !frame_q) begin
        word_l <= shreg;
        tgl    <= ~tgl;
      end
    end
  end

  // ---- system-clock domain
  logic [2:0] tgl_s;
  always_ff @(posedge clk) begin
    if (rst) begin
      tgl_s        <= '0;
      sample_valid <= 1'b0;
      sample       <= '0;
    end else begin
      tgl_s        <= {tgl_s[1:0], tgl};
      sample_valid <= tgl_s[2] ^ tgl_s[1];
      if (tgl_s[2] ^ tgl_s[1]) sample <= word_l;
    end
  end
endmodule
