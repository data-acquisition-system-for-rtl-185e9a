// event_merger: combines the event streams of N channels into one.
//
// Each source offers words with valid/ready and marks the last word of an
// event. The merger serves one source at a time and stays with it until the
// last word of its event has passed, so events are never interleaved; it
// then looks for the next source with data in round-robin order, starting
// after the one just served. Choosing a source costs one idle cycle. The
// round-robin order is this design's choice.
module event_merger
  import proton_pkg::*;
#(
  parameter int unsigned N = 12,
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [N-1:0]  src_valid,
  input  word_t         src_data [N],
  input  logic [N-1:0]  src_last,
  output logic [N-1:0]  src_ready,
  output logic          out_valid,
  output word_t         out_data,
  output logic          out_last,
  input  logic          out_ready
);
  logic          locked;
  logic [SW-1:0] cur, nxt;
  logic          found;

  // next source with data, searching from cur+1 round the ring
  always_comb begin
    nxt   = cur;
    found = 1'b0;
    for (int k = 1; k <= int'(N); k++) begin
      automatic int idx = (int'(cur) + k) % int'(N);
      if (!found && src_valid[idx]) begin
        nxt   = SW'(idx);
        found = 1'b1;
      end
    end
  end

  always_comb begin
    src_ready = '0;
    out_valid = locked && src_valid[cur];
    out_data  = src_data[cur];
    out_last  = src_last[cur];
    if (locked) src_ready[cur] = out_ready;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      locked <= 1'b0;
      cur    <= SW'(N - 1);
    end else if (!locked) begin
      if (found) begin
        cur    <= nxt;
        locked <= 1'b1;
      end
    end else if (out_valid && out_ready && out_last) begin
      locked <= 1'b0;
    end
  end
endmodule
