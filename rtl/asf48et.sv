// asf48et: the forward-tracker digitizer board logic (ASF48et).
//
// Forty-eight self-triggered channels (six octal ADCs) share the board's
// timestamp counter and serial port. On the "trigger" command every channel
// reloads the events of its look-back window; the event merger moves them,
// one whole event at a time, into the 16K-word output FIFO, which the serial
// port sends upstream as one data stream, pausing while the concentrator
// holds it. All ADC chips of a board share one bit clock and frame clock.
module asf48et
  import proton_pkg::*;
#(
  parameter int unsigned NCH        = 48,
  parameter int unsigned RING_DEPTH = 1024,
  parameter int unsigned OUT_FIFO   = 16384,
  parameter int unsigned DELAY_DEPTH = 1024
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           lclk,
  input  logic           frame,
  input  logic [NCH-1:0] d_rise,
  input  logic [NCH-1:0] d_fall,
  input  et_cfg_t        cfg,
  input  logic           sdi,
  output logic           sdo,
  output logic           running,
  output logic           hold,
  output logic [15:0]    n_captured [NCH],
  output logic [15:0]    n_lost [NCH],
  output logic [15:0]    n_sent [NCH],
  output logic [$clog2(OUT_FIFO):0] out_count
);
  logic           start_run, stop_run, trigger;
  ts_t            ts;
  logic [NCH-1:0] ch_valid, ch_last, ch_ready;
  word_t          ch_data [NCH];
  logic           m_valid, m_last, o_empty, o_full, tx_ready;
  word_t          m_data, o_dout;

  dig_sp u_sp (
    .clk, .rst, .sdi, .sdo,
    .data_valid(!o_empty), .data_word(o_dout), .data_ready(tx_ready),
    .start_run, .stop_run, .trigger, .hold
  );

  ts_counter u_ts (.clk, .rst, .start_run, .stop_run, .ts, .running);

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    et_channel #(.RING_DEPTH(RING_DEPTH), .DELAY_DEPTH(DELAY_DEPTH)) u_ch (
      .clk, .rst, .lclk, .frame, .d_rise(d_rise[c]), .d_fall(d_fall[c]),
      .ch(6'(c)), .cfg, .running, .trigger, .ts,
      .out_valid(ch_valid[c]), .out_data(ch_data[c]), .out_last(ch_last[c]), .out_ready(ch_ready[c]),
      .n_captured(n_captured[c]), .n_lost(n_lost[c]), .n_sent(n_sent[c])
    );
  end

  event_merger #(.N(NCH)) u_merge (
    .clk, .rst, .src_valid(ch_valid), .src_data(ch_data), .src_last(ch_last), .src_ready(ch_ready),
    .out_valid(m_valid), .out_data(m_data), .out_last(m_last), .out_ready(!o_full)
  );

  fifo_sync #(.DEPTH(OUT_FIFO), .W(WORD_W)) u_out (
    .clk, .rst, .wr_en(m_valid && !o_full), .din(m_data), .rd_en(tx_ready), .dout(o_dout),
    .empty(o_empty), .full(o_full), .count(out_count), .free()
  );
endmodule
