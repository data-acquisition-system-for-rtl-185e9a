// ccb_sp: one downstream serial port (SP) of the CCB12 concentrator.
//
// Toward the device the port sends the commands the concentrator broadcasts
// (start run, stop run, trigger), taking one from bc_valid in any cycle in
// which bc_ready is high; a broadcast goes before a pending hold/resume.
// From a digitizer the port receives data frames into a 16K-word input FIFO,
// the channel's derandomizing buffer, read by the packetizer. Flow control
// uses the "hold" and "resume" commands: when the FIFO fills beyond HOLD_AT
// words the port sends "hold", and once it has drained below RESUME_AT it
// sends "resume". A port that faces a Slave concentrator (slave_port = 1)
// receives no data, only busy-on/busy-off status frames, and reports the
// Slave's busy state. The watermarks (3/4 and 1/4 of the FIFO) and the busy
// status frames are this design's choices; the margin above HOLD_AT covers
// the words still in flight when "hold" takes effect.
module ccb_sp
  import proton_pkg::*;
#(
  parameter int unsigned DEPTH     = 16384,
  parameter int unsigned HOLD_AT   = DEPTH * 3 / 4,
  parameter int unsigned RESUME_AT = DEPTH / 4,
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        slave_port,
  output logic        sdo,
  input  logic        sdi,
  input  logic        bc_valid,
  input  word_t       bc_word,
  output logic        bc_ready,
  output logic        rd_valid,
  output word_t       rd_data,
  input  logic        rd_en,
  output logic [AW:0] count,
  output logic        held,          // "hold" has been sent and not yet released
  output logic        slave_busy,
  output logic [15:0] n_holds
);
  logic  rx_valid, rx_cmd, empty, full;
  word_t rx_word;
  logic  need_hold, need_resume, fc_valid, fc_ready;
  word_t fc_word;
  logic  cmd_valid, cmd_ready;
  word_t cmd_word;

  sl_rx u_rx (.clk, .rst, .sdi, .valid(rx_valid), .is_cmd(rx_cmd), .word(rx_word), .frame_err());

  fifo_sync #(.DEPTH(DEPTH), .W(WORD_W)) u_in (
    .clk, .rst, .wr_en(rx_valid && !rx_cmd && !slave_port), .din(rx_word),
    .rd_en(rd_en && !empty), .dout(rd_data), .empty, .full, .count, .free()
  );
  assign rd_valid = !empty;

  // flow control
  assign need_hold   = !slave_port && !held && (count > (AW+1)'(HOLD_AT));
  assign need_resume = !slave_port &&  held && (count < (AW+1)'(RESUME_AT));
  assign fc_valid    = need_hold || need_resume;
  assign fc_word     = {8'h00, need_hold ? CMD_HOLD : CMD_RESUME};

  // broadcast first, then flow control
  assign cmd_valid = bc_valid || fc_valid;
  assign cmd_word  = bc_valid ? bc_word : fc_word;
  assign bc_ready  = cmd_ready;
  assign fc_ready  = cmd_ready && !bc_valid;

  sl_tx u_tx (
    .clk, .rst, .cmd_valid, .cmd_word, .cmd_ready,
    .data_valid(1'b0), .data_word('0), .data_ready(), .sdo
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      held       <= 1'b0;
      slave_busy <= 1'b0;
      n_holds    <= '0;
    end else begin
      if (fc_valid && fc_ready) begin
        held <= need_hold;
        if (need_hold) n_holds <= n_holds + 1'b1;
      end
      if (rx_valid && rx_cmd && rx_word[7:0] == CMD_BUSY_ON)  slave_busy <= 1'b1;
      if (rx_valid && rx_cmd && rx_word[7:0] == CMD_BUSY_OFF) slave_busy <= 1'b0;
    end
  end

  a_no_loss: assert property (@(posedge clk) disable iff (rst) !(rx_valid && !rx_cmd && !slave_port && full));
endmodule
