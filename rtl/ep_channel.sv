// ep_channel: one channel of the TPC digitizer (ASF12eP).
//
// The chain follows the channel logic of the digitizer: the ADC deserializer
// produces a reading and a strobe; the 12-bit amplitude discriminator and the
// 18-bit moving integrating window with its 15-bit discriminator watch the
// undelayed readings and feed the trigger-request selector; the pipeline
// delay holds the readings back by cfg.delay samples; the event builder
// writes an event of cfg.len delayed readings into the 8K-word channel FIFO
// when the "trigger" command arrives. The FIFO is the channel's
// derandomizing buffer; its read side (valid/ready, last word of an event
// marked) feeds the board's event merger.
// Timing: the amplitude hit follows a reading by 2 clk cycles and the window
// hit by 3. The window is cleared on "start run".
module ep_channel
  import proton_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH  = 8192,
  parameter int unsigned DELAY_DEPTH = 1024
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             lclk,
  input  logic             frame,
  input  logic             d_rise,
  input  logic             d_fall,
  input  logic [5:0]       ch,
  input  ep_cfg_t          cfg,
  input  tr_mode_e         tr_mode,
  input  logic             start_run,
  input  logic             trigger,
  input  ts_t              ts,
  output logic             tr,
  output logic             sample_valid,
  output logic [ADC_W-1:0] sample,
  output logic             out_valid,
  output word_t            out_data,
  output logic             out_last,
  input  logic             out_ready,
  output logic [15:0]      n_events,
  output logic [15:0]      n_dropped,
  output logic [15:0]      n_ignored
);
  localparam int unsigned FAW = $clog2(FIFO_DEPTH);
  localparam int unsigned DAW = $clog2(DELAY_DEPTH);

  logic             amp_hit, miw_hit, ce_d;
  logic [17:0]      miw_sum;
  logic [ADC_W-1:0] dly;
  logic             wr_en, empty;
  logic [WORD_W:0]  wr_data, rd_data;
  logic [FAW:0]     free;

  adc_deser u_deser (.lclk, .d_rise, .d_fall, .frame, .clk, .rst, .sample_valid, .sample);

  amp_disc u_amp (.clk, .rst, .ce(sample_valid), .sample, .thr(cfg.amp_thr), .hit(amp_hit), .rise());

  miw u_miw (.clk, .rst, .clear(start_run), .ce(sample_valid), .sample, .width(cfg.miw_width), .sum(miw_sum));

  always_ff @(posedge clk) begin
    if (rst) ce_d <= 1'b0;
    else     ce_d <= sample_valid;
  end

  miw_disc u_miwd (.clk, .rst, .ce(ce_d), .sum(miw_sum), .thr(cfg.miw_thr), .hit(miw_hit));

  tr_select u_trsel (.amp_hit, .miw_hit, .mode(tr_mode), .tr);

  delay_line #(.DEPTH(DELAY_DEPTH)) u_delay (
    .clk, .rst, .ce(sample_valid), .din(sample), .delay(cfg.delay[DAW-1:0]), .dout(dly)
  );

  ep_event_builder u_evb (
    .clk, .rst, .ch, .len(cfg.len), .trigger, .ts, .ce(ce_d), .din(dly),
    .fifo_free(16'(free)), .wr_en, .wr_data, .active(),
    .n_events, .n_dropped, .n_ignored
  );

  fifo_sync #(.DEPTH(FIFO_DEPTH), .W(WORD_W + 1)) u_fifo (
    .clk, .rst, .wr_en, .din(wr_data), .rd_en(out_ready && !empty), .dout(rd_data),
    .empty, .full(), .count(), .free
  );

  assign out_valid = !empty;
  assign out_data  = rd_data[WORD_W-1:0];
  assign out_last  = rd_data[WORD_W];
endmodule
