// master_trigger: trigger logic of the Master concentrator.
//
// The trigger request (TR) from the TPC digitizers arrives on the trigger
// port asynchronously; it is synchronized with two flip-flops and its rising
// edge is one request. Every request during a run is time-stamped with the
// Master's 44-bit timestamp and becomes a "trigger" (trig pulse, broadcast to
// the whole tree) unless the system is busy or the previous trigger was less
// than min_gap clock ticks ago. Each request is recorded, used or not, as a
// three-word record {3'b111, used, ts[43:32]}, ts[31:16], ts[15:0] in a
// record FIFO that the packetizer sends as the Master's 13th data stream.
// trig follows the TR edge by 3 clk cycles. The record layout, the busy rule
// and the minimum spacing are this design's choices.
module master_trigger
  import proton_pkg::*;
#(
  parameter int unsigned REC_DEPTH = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        tr_async,
  input  logic        running,
  input  logic        busy,
  input  logic [31:0] min_gap,
  input  ts_t         ts,
  output logic        trig,
  output logic        rd_valid,
  output word_t       rd_data,
  input  logic        rd_en,
  output logic [$clog2(REC_DEPTH)+1:0] count,   // words waiting
  output logic [15:0] n_tr,
  output logic [15:0] n_trig,
  output logic [15:0] n_busy_rej
);
  localparam int unsigned RAW = $clog2(REC_DEPTH);
  logic [2:0]  sync;
  logic        edge_det, have_last, gap_ok, use_it, r_empty, r_full;
  ts_t         last_ts;
  logic [TS_W:0] rec_in, rec_out;   // {used, ts}
  logic [1:0]  widx;
  logic [RAW:0] r_count;

  assign edge_det = sync[1] && !sync[2];
  assign gap_ok   = !have_last || ((ts - last_ts) >= TS_W'(min_gap));
  assign use_it   = edge_det && running && !busy && gap_ok;
  assign rec_in   = {use_it, ts};

  always_ff @(posedge clk) begin
    if (rst) begin
      sync       <= '0;
      trig       <= 1'b0;
      last_ts    <= '0;
      have_last  <= 1'b0;
      n_tr       <= '0;
      n_trig     <= '0;
      n_busy_rej <= '0;
    end else begin
      sync <= {sync[1:0], tr_async};
      trig <= use_it;
      if (!running) have_last <= 1'b0;
      if (edge_det && running) begin
        n_tr <= n_tr + 1'b1;
        if (use_it) begin
          n_trig    <= n_trig + 1'b1;
          last_ts   <= ts;
          have_last <= 1'b1;
        end else if (busy) begin
          n_busy_rej <= n_busy_rej + 1'b1;
        end
      end
    end
  end

  fifo_sync #(.DEPTH(REC_DEPTH), .W(TS_W + 1)) u_rec (
    .clk, .rst, .wr_en(edge_det && running), .din(rec_in),
    .rd_en(rd_en && widx == 2'd2 && !r_empty), .dout(rec_out),
    .empty(r_empty), .full(r_full), .count(r_count), .free()
  );

  // serialize records into three words
  always_ff @(posedge clk) begin
    if (rst) widx <= '0;
    else if (rd_en && !r_empty) widx <= (widx == 2'd2) ? 2'd0 : widx + 1'b1;
  end

  assign rd_valid = !r_empty;
  assign count    = ($bits(count))'(r_count) * 3 - ($bits(count))'(widx);
  always_comb begin
    unique case (widx)
      2'd0:    rd_data = {3'b111, rec_out[TS_W], rec_out[43:32]};
      2'd1:    rd_data = rec_out[31:16];
      default: rd_data = rec_out[15:0];
    endcase
  end
endmodule
