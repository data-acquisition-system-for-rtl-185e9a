// ep_event_builder: event recorder of one TPC (ASF12eP) digitizer channel.
//
// When a "trigger" command arrives the builder writes one event into the
// channel FIFO: five header words (channel number, length, 44-bit timestamp
// of the trigger's arrival) followed by `len` readings taken from the
// pipeline-delayed stream, starting with the first delayed reading after the
// trigger cycle. With the delay set to D samples the event window therefore
// starts D samples before the trigger (typically 15 us before and 25 us
// after). Readings that arrive while the header is still being written wait
// in a 4-entry staging queue; the FIFO accepts one word per clock, so the
// queue never holds more than three. Each FIFO word carries a 17th bit that
// marks the last word of an event.
// A trigger that arrives while an event is being recorded is ignored and
// counted; an event that would not fit the free FIFO space is not recorded
// and counted as dropped. Both rules are this design's choices.
module ep_event_builder
  import proton_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic [5:0]       ch,
  input  logic [LEN_W-1:0] len,
  input  logic             trigger,
  input  ts_t              ts,
  input  logic             ce,        // delayed-reading strobe
  input  logic [ADC_W-1:0] din,       // delayed reading
  input  logic [15:0]      fifo_free,
  output logic             wr_en,
  output logic [WORD_W:0]  wr_data,   // {last, word}
  output logic             active,
  output logic [15:0]      n_events,
  output logic [15:0]      n_dropped,
  output logic [15:0]      n_ignored
);
  typedef enum logic [1:0] {IDLE, HDR, DATA} state_e;
  state_e           state;
  ts_t              ts_l;
  logic [2:0]       hidx;
  logic [LEN_W-1:0] cap_left, wr_left;

  // staging queue for readings captured during the header
  logic             st_push, st_pop, st_empty;
  logic [ADC_W-1:0] st_dout;
  logic             start;

  assign start   = (state == IDLE) && trigger && (fifo_free >= 16'(HDR_WORDS) + 16'(len));
  assign st_push = ce && (cap_left != '0);
  assign st_pop  = (state == DATA) && !st_empty;
  assign active  = (state != IDLE);

  fifo_sync #(.DEPTH(4), .W(ADC_W)) u_stage (
    .clk, .rst, .wr_en(st_push), .din, .rd_en(st_pop), .dout(st_dout),
    .empty(st_empty), .full(), .count(), .free()
  );

  always_comb begin
    wr_en   = 1'b0;
    wr_data = '0;
    if (state == HDR) begin
      wr_en   = 1'b1;
      wr_data = {(hidx == 3'd4) && (len == '0), event_header(int'(hidx), ch, len, ts_l)};
    end else if (st_pop) begin
      wr_en   = 1'b1;
      wr_data = {wr_left == LEN_W'(1), 4'h0, st_dout};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      ts_l      <= '0;
      hidx      <= '0;
      cap_left  <= '0;
      wr_left   <= '0;
      n_events  <= '0;
      n_dropped <= '0;
      n_ignored <= '0;
    end else begin
      if (st_push) cap_left <= cap_left - 1'b1;
      unique case (state)
        IDLE: begin
          if (start) begin
            state    <= HDR;
            ts_l     <= ts;
            hidx     <= '0;
            cap_left <= len;
            wr_left  <= len;
            n_events <= n_events + 1'b1;
          end else if (trigger) begin
            n_dropped <= n_dropped + 1'b1;
          end
        end
        HDR: begin
          hidx <= hidx + 1'b1;
          if (hidx == 3'd4) state <= (len == '0) ? IDLE : DATA;
        end
        default: begin
          if (st_pop) begin
            wr_left <= wr_left - 1'b1;
            if (wr_left == LEN_W'(1)) state <= IDLE;
          end
        end
      endcase
      if (trigger && state != IDLE) n_ignored <= n_ignored + 1'b1;
    end
  end
endmodule
