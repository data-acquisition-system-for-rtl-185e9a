// ccb_packetizer: moves data from the concentrator's input FIFOs into the
// 32K-word output FIFO as packets.
//
// The sources (the twelve SP input FIFOs and, on the Master, the trigger
// record stream) are visited in round-robin order. A source holding n > 0
// words gets a packet of min(n, PKT_MAX) payload words, provided the output
// FIFO has room for the whole packet; otherwise the packetizer waits. Packet:
//   header  {4'hA, sp[3:0], in_kw[7:0]}, {out_kw[7:0], 8'h00}, packet number,
//           {4'h0, ts[43:32]}, ts[31:16], ts[15:0], payload length
//   payload n words
//   trailer {4'h0, ts[43:32]}, ts[31:16], ts[15:0], checksum
// in_kw and out_kw are the kilo-words held in the source and output FIFOs at
// the start of the packet, the packet number counts per source, and the
// checksum is the 16-bit sum of all earlier words of the packet. One word is
// written per clock. The field layout and PKT_MAX are this design's choices.
module ccb_packetizer
  import proton_pkg::*;
#(
  parameter int unsigned NSRC    = 13,
  parameter int unsigned PKT_MAX = 1024,
  parameter int unsigned CNT_W   = 16,
  localparam int unsigned SW     = $clog2(NSRC)
) (
  input  logic             clk,
  input  logic             rst,
  input  ts_t              ts,
  input  logic [NSRC-1:0]  src_valid,
  input  word_t            src_data [NSRC],
  input  logic [CNT_W-1:0] src_count [NSRC],
  output logic [NSRC-1:0]  src_rd,
  input  logic [CNT_W-1:0] out_free,
  input  logic [CNT_W-1:0] out_count,
  output logic             wr_en,
  output word_t            wr_data,
  output logic [15:0]      n_packets
);
  typedef enum logic [1:0] {P_SCAN, P_HDR, P_PAY, P_TRL} pstate_e;
  pstate_e        ps;
  logic [SW-1:0]  cur;
  logic [2:0]     idx;
  logic [15:0]    n, left;
  word_t          csum;
  logic [15:0]    pkt_no [NSRC];
  logic [7:0]     in_kw, out_kw;
  ts_t            ts_h, ts_t_l;
  logic [CNT_W-1:0] avail;
  logic [15:0]    n_next;

  assign avail  = src_count[cur];
  assign n_next = (avail > CNT_W'(PKT_MAX)) ? 16'(PKT_MAX) : 16'(avail);

  always_comb begin
    wr_en   = 1'b0;
    wr_data = '0;
    src_rd  = '0;
    unique case (ps)
      P_HDR: begin
        wr_en = 1'b1;
        unique case (idx)
          3'd0:    wr_data = {4'hA, 4'(cur), in_kw};
          3'd1:    wr_data = {out_kw, 8'h00};
          3'd2:    wr_data = pkt_no[cur];
          3'd3:    wr_data = {4'h0, ts_h[43:32]};
          3'd4:    wr_data = ts_h[31:16];
          3'd5:    wr_data = ts_h[15:0];
          default: wr_data = n;
        endcase
      end
      P_PAY: begin
        wr_en       = src_valid[cur];
        wr_data     = src_data[cur];
        src_rd[cur] = src_valid[cur];
      end
      P_TRL: begin
        wr_en = 1'b1;
        unique case (idx)
          3'd0:    wr_data = {4'h0, ts_t_l[43:32]};
          3'd1:    wr_data = ts_t_l[31:16];
          3'd2:    wr_data = ts_t_l[15:0];
          default: wr_data = csum;
        endcase
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ps        <= P_SCAN;
      cur       <= '0;
      idx       <= '0;
      n         <= '0;
      left      <= '0;
      csum      <= '0;
      in_kw     <= '0;
      out_kw    <= '0;
      ts_h      <= '0;
      ts_t_l    <= '0;
      n_packets <= '0;
      for (int s = 0; s < int'(NSRC); s++) pkt_no[s] <= '0;
    end else begin
      if (wr_en) csum <= csum + wr_data;
      unique case (ps)
        P_SCAN: begin
          csum <= '0;
          if (avail != '0 &&
              out_free >= CNT_W'(n_next) + CNT_W'(PKT_HDR_WORDS + PKT_TRL_WORDS)) begin
            ps     <= P_HDR;
            idx    <= '0;
            n      <= n_next;
            left   <= n_next;
            in_kw  <= 8'(avail >> 10);
            out_kw <= 8'(out_count >> 10);
            ts_h   <= ts;
          end else if (avail == '0) begin
            cur <= (cur == SW'(NSRC - 1)) ? '0 : cur + 1'b1;
          end
        end
        P_HDR: begin
          idx <= idx + 1'b1;
          if (idx == 3'(PKT_HDR_WORDS - 1)) ps <= P_PAY;
        end
        P_PAY: begin
          if (src_valid[cur]) begin
            left <= left - 1'b1;
            if (left == 16'd1) begin
              ps     <= P_TRL;
              idx    <= '0;
              ts_t_l <= ts;
            end
          end
        end
        default: begin
          idx <= idx + 1'b1;
          if (idx == 3'(PKT_TRL_WORDS - 1)) begin
            ps        <= P_SCAN;
            pkt_no[cur] <= pkt_no[cur] + 1'b1;
            n_packets <= n_packets + 1'b1;
            cur       <= (cur == SW'(NSRC - 1)) ? '0 : cur + 1'b1;
          end
        end
      endcase
    end
  end
endmodule
