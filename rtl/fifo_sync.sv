// fifo_sync: single-clock first-in-first-out buffer, the derandomizing buffer
// used throughout the acquisition tree (8K channel FIFOs and the 32K device
// FIFO of the TPC digitizer, the 16K output FIFO of the tracker digitizer,
// the 16K input FIFOs and the 32K output FIFO of the concentrator).
//
// The storage is a plain memory array with a write and a read pointer one bit
// wider than the address. The read side is first-word-fall-through: dout
// shows the oldest word whenever empty is low, and rd_en consumes it. count
// is the number of stored words; free is DEPTH - count. Writes to a full FIFO
// and reads from an empty one are ignored (assertions flag them). DEPTH must
// be a power of two.
module fifo_sync #(
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned W     = 17,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr_en,
  input  logic [W-1:0] din,
  input  logic         rd_en,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full,
  output logic [AW:0]  count,
  output logic [AW:0]  free
);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;

  assign count = wp - rp;
  assign free  = (AW+1)'(DEPTH) - count;
  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign dout  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wp[AW-1:0]] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (wr_en && !full)  wp <= wp + 1'b1;
      if (rd_en && !empty) rp <= rp + 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(rd_en && empty));
endmodule
