// et_channel: one channel of the forward-tracker digitizer (ASF48et).
//
// Each channel triggers itself: the ADC deserializer delivers readings, the
// amplitude discriminator's rising edge is the self-trigger, the pipeline
// delay holds readings back by cfg.delay samples so an event starts on the
// baseline before the pulse, and the ring buffer keeps the recent events
// with their timestamps. On the "trigger" command the ring buffer sends the
// events of the look-back window (cfg.window ticks) to the board's merger as
// a valid/ready stream.
module et_channel
  import proton_pkg::*;
#(
  parameter int unsigned RING_DEPTH  = 1024,
  parameter int unsigned DELAY_DEPTH = 1024
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             lclk,
  input  logic             frame,
  input  logic             d_rise,
  input  logic             d_fall,
  input  logic [5:0]       ch,
  input  et_cfg_t          cfg,
  input  logic             running,
  input  logic             trigger,
  input  ts_t              ts,
  output logic             out_valid,
  output word_t            out_data,
  output logic             out_last,
  input  logic             out_ready,
  output logic [15:0]      n_captured,
  output logic [15:0]      n_lost,
  output logic [15:0]      n_sent
);
  localparam int unsigned DAW = $clog2(DELAY_DEPTH);

  logic             sample_valid, self_trig, hit, ce_d;
  logic [ADC_W-1:0] sample, dly;

  adc_deser u_deser (.lclk, .d_rise, .d_fall, .frame, .clk, .rst, .sample_valid, .sample);

  amp_disc u_amp (.clk, .rst, .ce(sample_valid), .sample, .thr(cfg.thr), .hit, .rise(self_trig));

  delay_line #(.DEPTH(DELAY_DEPTH)) u_delay (
    .clk, .rst, .ce(sample_valid), .din(sample), .delay(cfg.delay[DAW-1:0]), .dout(dly)
  );

  always_ff @(posedge clk) begin
    if (rst) ce_d <= 1'b0;
    else     ce_d <= sample_valid;
  end

  et_ring_buffer #(.DEPTH(RING_DEPTH)) u_ring (
    .clk, .rst, .ch, .len(cfg.len), .window(cfg.window), .ts, .running,
    .self_trig, .ce(ce_d), .din(dly), .trigger,
    .out_valid, .out_data, .out_last, .out_ready,
    .n_captured, .n_lost, .n_sent
  );
endmodule
