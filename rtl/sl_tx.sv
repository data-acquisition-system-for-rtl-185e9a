// sl_tx: transmitter of a 100 Mbps serial link (SL) between a concentrator
// serial port and a downstream device.
//
// One bit leaves per cycle of the 100 MHz system clock. Each word is a
// 20-bit frame: start bit 1, type bit (1 = command, 0 = data), 16 payload
// bits MSB first, even parity over type and payload, stop bit 0. The line is
// 0 when idle. Two request inputs share the line: a pending command always
// goes before a pending data word, so commands (triggers, hold) are never
// queued behind data. A word is taken (its *_ready pulses) in the cycle its
// frame begins; the next frame can start right after the stop bit, giving
// 5 M words/s. The frame format is this design's choice; the system
// description fixes only the 100 Mbps rate in both directions.
module sl_tx
  import proton_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  cmd_valid,
  input  word_t cmd_word,
  output logic  cmd_ready,
  input  logic  data_valid,
  input  word_t data_word,
  output logic  data_ready,
  output logic  sdo
);
  localparam int FRAME = 20;
  logic [FRAME-1:0] shreg;
  logic [4:0]       left;   // bits still to send, 0 = idle

  logic             go_cmd, go_data;
  assign go_cmd     = (left == 0) && cmd_valid;
  assign go_data    = (left == 0) && !cmd_valid && data_valid;
  assign cmd_ready  = go_cmd;
  assign data_ready = go_data;

  function automatic logic [FRAME-1:0] mk_frame(input logic is_cmd, input word_t w);
    return {1'b1, is_cmd, w, ^{is_cmd, w}, 1'b0};
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg <= '0;
      left  <= '0;
      sdo   <= 1'b0;
    end else if (go_cmd || go_data) begin
      shreg <= mk_frame(go_cmd, go_cmd ? cmd_word : data_word) << 1;
      sdo   <= 1'b1;                 // start bit
      left  <= 5'(FRAME - 1);
    end else if (left != 0) begin
      sdo   <= shreg[FRAME-1];
      shreg <= shreg << 1;
      left  <= left - 1'b1;
    end else begin
      sdo   <= 1'b0;
    end
  end
endmodule
