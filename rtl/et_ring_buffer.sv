// et_ring_buffer: self-triggered event store of one tracker (ASF48et) channel.
//
// Capture: a self-trigger (rising edge of the amplitude discriminator) starts
// an event of `len` readings from the pipeline-delayed stream, so the event
// holds baseline readings before the pulse and its maximum. The readings are
// written one after another into a 1K-word circular memory; the event's
// timestamp (the self-trigger time) and start position go into a small
// descriptor queue when the event is complete. When a new event reserves
// memory, descriptors of older events it will overwrite are discarded, so
// every queued descriptor points at intact readings.
// Reload: on a "trigger" command the buffer walks its descriptors from the
// oldest and sends every event whose timestamp lies within `window` clock
// ticks before the trigger (100 us = 10000 ticks), each as five header words
// (the same layout as the TPC digitizer's events) and its readings, on a
// valid/ready stream with the last word marked. An event still being
// captured when the trigger arrives is sent once it is complete. Events
// stay in the ring and can serve a later trigger too. One trigger arriving
// during a reload is remembered and served next.
// This design's own choices: headers are made at reload, not stored in the
// ring; the queue holds NDESC events; a self-trigger is not taken (and is
// counted as lost) while an event is being captured, when the queue is full
// of events still needed, or when its readings would overwrite the event
// being sent.
module et_ring_buffer
  import proton_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned NDESC = 16,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned QW   = $clog2(NDESC)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [5:0]       ch,
  input  logic [LEN_W-1:0] len,
  input  logic [15:0]      window,
  input  ts_t              ts,
  input  logic             running,
  input  logic             self_trig,
  input  logic             ce,        // delayed-reading strobe
  input  logic [ADC_W-1:0] din,       // delayed reading
  input  logic             trigger,
  output logic             out_valid,
  output word_t            out_data,
  output logic             out_last,
  input  logic             out_ready,
  output logic [15:0]      n_captured,
  output logic [15:0]      n_lost,
  output logic [15:0]      n_sent
);
  localparam int unsigned CW = 16;   // free-running word counts, > 2*DEPTH

  typedef struct packed {
    logic [CW-1:0]    start;
    logic [LEN_W-1:0] len;
    ts_t              ts;
  } desc_t;

  logic [ADC_W-1:0] mem [DEPTH];
  desc_t            q [NDESC];
  logic [QW:0]      head, tail;
  logic [CW-1:0]    wr_cnt, res_end;
  logic [LEN_W-1:0] cap_left;
  ts_t              cap_ts;
  logic [CW-1:0]    cap_start;

  typedef enum logic [1:0] {R_IDLE, R_CHECK, R_HDR, R_DATA} rstate_e;
  rstate_e          rs;
  logic [QW:0]      ridx, rend;
  ts_t              t_trig;
  logic             pend;
  logic             inc_cap;       // an event was being captured at the trigger
  ts_t              pend_ts;
  logic [2:0]       hidx;
  logic [LEN_W-1:0] roff;

  logic [QW:0]      qcount;
  desc_t            hd, rd;
  logic             reading;       // a descriptor is in use by the reader
  logic             cap_busy, start_cap, pop, in_win, ovw_rd, stale_rd;
  ts_t              dt;

  assign qcount   = tail - head;
  assign hd       = q[head[QW-1:0]];
  assign rd       = q[ridx[QW-1:0]];
  assign reading  = (rs == R_HDR) || (rs == R_DATA) || (rs == R_CHECK && ridx != rend);
  assign cap_busy = (cap_left != '0);
  // would a new event of len readings overwrite the event being read?
  assign ovw_rd   = reading && ((wr_cnt + CW'(len) - rd.start) > CW'(DEPTH));
  assign start_cap = running && self_trig && !cap_busy && (qcount < (QW+1)'(NDESC)) && !ovw_rd;
  assign pop = (qcount != '0) && !(reading && head == ridx) &&
               (((res_end - hd.start) > CW'(DEPTH)) || (qcount == (QW+1)'(NDESC) && self_trig));
  assign dt       = t_trig - rd.ts;
  assign in_win   = (dt <= TS_W'(window));
  assign stale_rd = (res_end - rd.start) > CW'(DEPTH);

  // ---------------- capture
  always_ff @(posedge clk) begin
    if (ce && cap_busy) mem[wr_cnt[AW-1:0]] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_cnt     <= '0;
      res_end    <= '0;
      cap_left   <= '0;
      cap_ts     <= '0;
      cap_start  <= '0;
      tail       <= '0;
      head       <= '0;
      n_captured <= '0;
      n_lost     <= '0;
    end else begin
      if (start_cap) begin
        cap_left  <= len;
        cap_ts    <= ts;
        cap_start <= wr_cnt;
        res_end   <= wr_cnt + CW'(len);
      end else if (self_trig && running) begin
        n_lost <= n_lost + 1'b1;
      end
      if (ce && cap_busy) begin
        wr_cnt   <= wr_cnt + 1'b1;
        cap_left <= cap_left - 1'b1;
        if (cap_left == LEN_W'(1)) begin
          q[tail[QW-1:0]] <= '{start: cap_start, len: len, ts: cap_ts};
          tail            <= tail + 1'b1;
          n_captured      <= n_captured + 1'b1;
        end
      end
      if (pop) head <= head + 1'b1;
    end
  end

  // ---------------- reload
  always_comb begin
    out_valid = 1'b0;
    out_data  = '0;
    out_last  = 1'b0;
    if (rs == R_HDR) begin
      out_valid = 1'b1;
      out_data  = event_header(int'(hidx), ch, rd.len, rd.ts);
      out_last  = (hidx == 3'd4) && (rd.len == '0);
    end else if (rs == R_DATA) begin
      out_valid = 1'b1;
      out_data  = {4'h0, mem[AW'(rd.start + CW'(roff))]};
      out_last  = (roff == rd.len - 1'b1);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rs      <= R_IDLE;
      ridx    <= '0;
      rend    <= '0;
      t_trig  <= '0;
      pend    <= 1'b0;
      inc_cap <= 1'b0;
      pend_ts <= '0;
      hidx    <= '0;
      roff    <= '0;
      n_sent  <= '0;
    end else begin
      if (trigger && rs != R_IDLE) begin
        pend    <= 1'b1;
        pend_ts <= ts;
      end
      unique case (rs)
        R_IDLE: begin
          if (trigger || pend) begin
            rs     <= R_CHECK;
            t_trig <= trigger ? ts : pend_ts;
            pend   <= 1'b0;
            ridx   <= head;
            rend   <= tail;
            inc_cap <= cap_busy;
          end
        end
        R_CHECK: begin
          if (ridx == rend) begin
            if (!inc_cap) begin
              rs <= R_IDLE;
            end else if (tail != rend) begin  // that event is now complete
              rend    <= rend + 1'b1;
              inc_cap <= 1'b0;
            end
          end else if ((ridx - head) > (rend - head)) begin
            ridx <= head;                   // skipped past discarded entries
          end else if (in_win && !stale_rd) begin
            rs   <= R_HDR;
            hidx <= '0;
          end else begin
            ridx <= ridx + 1'b1;
          end
        end
        R_HDR: begin
          if (out_ready) begin
            hidx <= hidx + 1'b1;
            if (hidx == 3'd4) begin
              roff <= '0;
              if (rd.len == '0) begin
                rs   <= R_CHECK;
                ridx <= ridx + 1'b1;
              end else begin
                rs <= R_DATA;
              end
            end
          end
        end
        default: begin
          if (out_ready) begin
            roff <= roff + 1'b1;
            if (out_last) begin
              rs     <= R_CHECK;
              ridx   <= ridx + 1'b1;
              n_sent <= n_sent + 1'b1;
            end
          end
        end
      endcase
    end
  end
endmodule
