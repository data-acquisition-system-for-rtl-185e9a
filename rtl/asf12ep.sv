// asf12ep: the TPC digitizer board logic (ASF12eP).
//
// Twelve channels (ep_channel) share the board's timestamp counter and serial
// port. A "trigger" command makes every channel record an event stamped with
// the trigger's arrival time. The event merger moves whole events from the
// 8K-word channel FIFOs into the 32K-word device FIFO, which the serial port
// sends upstream as one data stream, pausing while the concentrator holds
// it. The channel trigger requests are ORed with the request arriving from
// the neighbouring board (tr_in, left auxiliary port) and passed on
// (tr_out, right auxiliary port); on the last board of the chain tr_out
// drives the trigger link to the Master concentrator. Requests are sent only
// during a run; tr_out is registered (one clock per board).
// All ADC chips of a board share one bit clock and frame clock.
module asf12ep
  import proton_pkg::*;
#(
  parameter int unsigned NCH         = 12,
  parameter int unsigned CH_FIFO     = 8192,
  parameter int unsigned DEV_FIFO    = 32768,
  parameter int unsigned DELAY_DEPTH = 1024,
  parameter logic [5:0]  CH_BASE     = 6'd0
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            lclk,
  input  logic            frame,
  input  logic [NCH-1:0]  d_rise,
  input  logic [NCH-1:0]  d_fall,
  input  ep_cfg_t         cfg,
  input  tr_mode_e        tr_mode [NCH],
  input  logic            sdi,
  output logic            sdo,
  input  logic            tr_in,
  output logic            tr_out,
  output logic            running,
  output logic            hold,
  output logic [15:0]     n_events [NCH],
  output logic [15:0]     n_dropped [NCH],
  output logic [15:0]     n_ignored [NCH],
  output logic [$clog2(DEV_FIFO):0] dev_count
);
  logic           start_run, stop_run, trigger;
  ts_t            ts;
  logic [NCH-1:0] ch_tr, ch_valid, ch_last, ch_ready;
  word_t          ch_data [NCH];
  logic           m_valid, m_last, dev_empty, dev_full, tx_ready;
  word_t          m_data, dev_dout;

  dig_sp u_sp (
    .clk, .rst, .sdi, .sdo,
    .data_valid(!dev_empty), .data_word(dev_dout), .data_ready(tx_ready),
    .start_run, .stop_run, .trigger, .hold
  );

  ts_counter u_ts (.clk, .rst, .start_run, .stop_run, .ts, .running);

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    ep_channel #(.FIFO_DEPTH(CH_FIFO), .DELAY_DEPTH(DELAY_DEPTH)) u_ch (
      .clk, .rst, .lclk, .frame, .d_rise(d_rise[c]), .d_fall(d_fall[c]),
      .ch(CH_BASE + 6'(c)), .cfg, .tr_mode(tr_mode[c]),
      .start_run, .trigger, .ts, .tr(ch_tr[c]),
      .sample_valid(), .sample(),
      .out_valid(ch_valid[c]), .out_data(ch_data[c]), .out_last(ch_last[c]), .out_ready(ch_ready[c]),
      .n_events(n_events[c]), .n_dropped(n_dropped[c]), .n_ignored(n_ignored[c])
    );
  end

  event_merger #(.N(NCH)) u_merge (
    .clk, .rst, .src_valid(ch_valid), .src_data(ch_data), .src_last(ch_last), .src_ready(ch_ready),
    .out_valid(m_valid), .out_data(m_data), .out_last(m_last), .out_ready(!dev_full)
  );

  fifo_sync #(.DEPTH(DEV_FIFO), .W(WORD_W)) u_dev (
    .clk, .rst, .wr_en(m_valid && !dev_full), .din(m_data), .rd_en(tx_ready), .dout(dev_dout),
    .empty(dev_empty), .full(dev_full), .count(dev_count), .free()
  );

  always_ff @(posedge clk) begin
    if (rst) tr_out <= 1'b0;
    else     tr_out <= tr_in || (running && (|ch_tr));
  end
endmodule
