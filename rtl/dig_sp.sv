// dig_sp: serial port (SP) of a digitizer.
//
// Downstream direction: the port receives command frames from its
// concentrator and turns them into one-cycle pulses (start run, stop run,
// trigger). All devices of the tree see a broadcast command in the same
// cycle, which keeps their timestamps and trigger times aligned. The "hold"
// and "resume" commands set and clear a hold flag.
// Upstream direction: the port sends the digitizer's output stream as data
// frames, one word per 20 clock cycles, and sends nothing new while hold is
// set (a frame already started is completed). Frames with a parity error are
// dropped.
module dig_sp
  import proton_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  sdi,
  output logic  sdo,
  input  logic  data_valid,
  input  word_t data_word,
  output logic  data_ready,
  output logic  start_run,
  output logic  stop_run,
  output logic  trigger,
  output logic  hold
);
  logic  rx_valid, rx_cmd;
  word_t rx_word;
  logic  is_cmd_now;

  sl_rx u_rx (.clk, .rst, .sdi, .valid(rx_valid), .is_cmd(rx_cmd), .word(rx_word), .frame_err());

  assign is_cmd_now = rx_valid && rx_cmd;
  assign start_run  = is_cmd_now && (rx_word[7:0] == CMD_START_RUN);
  assign stop_run   = is_cmd_now && (rx_word[7:0] == CMD_STOP_RUN);
  assign trigger    = is_cmd_now && (rx_word[7:0] == CMD_TRIGGER);

  always_ff @(posedge clk) begin
    if (rst) hold <= 1'b0;
    else if (is_cmd_now && rx_word[7:0] == CMD_HOLD)   hold <= 1'b1;
    else if (is_cmd_now && rx_word[7:0] == CMD_RESUME) hold <= 1'b0;
  end

  sl_tx u_tx (
    .clk, .rst,
    .cmd_valid(1'b0), .cmd_word('0), .cmd_ready(),
    .data_valid(data_valid && !hold), .data_word, .data_ready,
    .sdo
  );
endmodule
