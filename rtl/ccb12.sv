// ccb12: logic of the 12-port concentrator-control board (CCB12).
//
// The same logic serves as Master (MASTER = 1) and Slave (MASTER = 0).
// Commands: the Master takes "start run"/"stop run" from the host (through
// the board's processor, host_cmd_*) and makes "trigger" itself from the
// trigger requests on its trigger port; a Slave receives these broadcast
// commands on its upstream serial port (USP). Either way the concentrator
// acts on a command itself (its timestamp counter starts on "start run") and
// forwards it to all twelve downstream serial ports (SPs), so that the whole
// tree works in step.
// Data: each SP stores the data stream of its digitizer in a 16K-word input
// FIFO and throttles it with hold/resume; the packetizer moves the data into
// the 32K-word output FIFO as packets with headers and trailers, adding on
// the Master the trigger records as a 13th stream. The output FIFO's read
// side goes to the board's processor, which forwards packets over Ethernet.
// Busy: a Slave reports busy on its USP while any of its SPs holds its
// digitizer or its output FIFO is nearly full; SPs of the Master that face a
// Slave (sp_slave) receive no data, only this busy state, which together with
// the Master's own held SPs blocks new triggers. Each SP holds one pending
// broadcast; a broadcast follows the previous one by at least 20 cycles
// (one frame) in normal use. Busy reporting and the port mask are this
// design's choices.
module ccb12
  import proton_pkg::*;
#(
  parameter bit          MASTER    = 1'b0,
  parameter int unsigned NSP       = 12,
  parameter int unsigned IN_FIFO   = 16384,
  parameter int unsigned OUT_FIFO  = 32768,
  parameter int unsigned PKT_MAX   = 1024,
  localparam int unsigned OAW      = $clog2(OUT_FIFO),
  localparam int unsigned IAW      = $clog2(IN_FIFO)
) (
  input  logic           clk,
  input  logic           rst,
  // upstream serial port (Slave)
  input  logic           usp_sdi,
  output logic           usp_sdo,
  // host commands (Master)
  input  logic           host_cmd_valid,
  input  cmd_e           host_cmd,
  output logic           host_cmd_ready,
  // trigger port (Master)
  input  logic           tp_tr,
  input  logic [31:0]    min_gap,
  // downstream serial ports
  input  logic [NSP-1:0] sp_slave,
  output logic [NSP-1:0] sp_sdo,
  input  logic [NSP-1:0] sp_sdi,
  // output FIFO toward the processor
  output logic           out_valid,
  output word_t          out_data,
  input  logic           out_rd,
  output logic [OAW:0]   out_count,
  // status
  output logic           running,
  output logic           busy,
  output logic [15:0]    n_holds [NSP],
  output logic [15:0]    n_packets,
  output logic [15:0]    n_tr,
  output logic [15:0]    n_trig,
  output logic [15:0]    n_busy_rej
);
  localparam int unsigned NSRC = NSP + 1;

  ts_t            ts;
  logic           bc_fire;
  word_t          bc_new;
  logic [NSP-1:0] bc_pend, bc_ready, held, sl_busy;
  word_t          bc_word [NSP];
  logic           start_run, stop_run, trig;
  logic [NSRC-1:0] src_valid, src_rd;
  word_t          src_data [NSRC];
  logic [15:0]    src_count [NSRC];
  logic [OAW:0]   o_free;
  logic           pk_wr, o_empty;
  word_t          pk_data;
  logic           busy_local;

  // ---------------- command source
  if (MASTER) begin : g_master
    logic        tv, tr_rd;
    word_t       td;
    logic [$clog2(1024)+1:0] tcnt;
    master_trigger u_trig (
      .clk, .rst, .tr_async(tp_tr), .running, .busy, .min_gap, .ts, .trig,
      .rd_valid(tv), .rd_data(td), .rd_en(tr_rd), .count(tcnt),
      .n_tr, .n_trig, .n_busy_rej
    );
    assign bc_fire        = trig || host_cmd_valid;
    assign bc_new         = {8'h00, trig ? CMD_TRIGGER : host_cmd};
    assign host_cmd_ready = !trig;
    assign src_valid[NSP] = tv;
    assign src_data[NSP]  = td;
    assign src_count[NSP] = 16'(tcnt);
    assign tr_rd          = src_rd[NSP];
    assign usp_sdo        = 1'b0;
    assign busy           = |(sp_slave & sl_busy) || |(~sp_slave & held) || busy_local;
  end else begin : g_slave
    logic  rx_valid, rx_cmd, reported, up_rdy;
    word_t rx_word;
    sl_rx u_usp_rx (.clk, .rst, .sdi(usp_sdi), .valid(rx_valid), .is_cmd(rx_cmd), .word(rx_word), .frame_err());
    assign bc_fire = rx_valid && rx_cmd &&
                     (rx_word[7:0] == CMD_START_RUN || rx_word[7:0] == CMD_STOP_RUN ||
                      rx_word[7:0] == CMD_TRIGGER);
    assign bc_new  = rx_word;
    assign trig    = 1'b0;
    assign host_cmd_ready = 1'b0;
    assign src_valid[NSP] = 1'b0;
    assign src_data[NSP]  = '0;
    assign src_count[NSP] = '0;
    assign n_tr = '0;
    assign n_trig = '0;
    assign n_busy_rej = '0;
    assign busy = busy_local || |held;
    // report busy changes upstream
    sl_tx u_usp_tx (
      .clk, .rst, .cmd_valid(busy != reported),
      .cmd_word({8'h00, busy ? CMD_BUSY_ON : CMD_BUSY_OFF}), .cmd_ready(up_rdy),
      .data_valid(1'b0), .data_word('0), .data_ready(), .sdo(usp_sdo)
    );
    always_ff @(posedge clk) begin
      if (rst)         reported <= 1'b0;
      else if (up_rdy) reported <= busy;
    end
  end

  assign start_run = bc_fire && bc_new[7:0] == CMD_START_RUN;
  assign stop_run  = bc_fire && bc_new[7:0] == CMD_STOP_RUN;

  ts_counter u_ts (.clk, .rst, .start_run, .stop_run, .ts, .running);

  // ---------------- downstream ports
  for (genvar i = 0; i < NSP; i++) begin : g_sp
    logic [IAW:0] cnt;
    always_ff @(posedge clk) begin
      if (rst) begin
        bc_pend[i] <= 1'b0;
        bc_word[i] <= '0;
      end else if (bc_fire) begin
        bc_pend[i] <= 1'b1;
        bc_word[i] <= bc_new;
      end else if (bc_ready[i]) begin
        bc_pend[i] <= 1'b0;
      end
    end
    ccb_sp #(.DEPTH(IN_FIFO)) u_sp (
      .clk, .rst, .slave_port(sp_slave[i]), .sdo(sp_sdo[i]), .sdi(sp_sdi[i]),
      .bc_valid(bc_pend[i]), .bc_word(bc_word[i]), .bc_ready(bc_ready[i]),
      .rd_valid(src_valid[i]), .rd_data(src_data[i]), .rd_en(src_rd[i]), .count(cnt),
      .held(held[i]), .slave_busy(sl_busy[i]), .n_holds(n_holds[i])
    );
    assign src_count[i] = 16'(cnt);
  end

  // ---------------- packets to the output FIFO
  ccb_packetizer #(.NSRC(NSRC), .PKT_MAX(PKT_MAX), .CNT_W(16)) u_pk (
    .clk, .rst, .ts, .src_valid, .src_data, .src_count, .src_rd,
    .out_free(16'(o_free)), .out_count(16'(out_count)),
    .wr_en(pk_wr), .wr_data(pk_data), .n_packets
  );

  fifo_sync #(.DEPTH(OUT_FIFO), .W(WORD_W)) u_out (
    .clk, .rst, .wr_en(pk_wr), .din(pk_data), .rd_en(out_rd && !o_empty), .dout(out_data),
    .empty(o_empty), .full(), .count(out_count), .free(o_free)
  );
  assign out_valid  = !o_empty;
  assign busy_local = o_free < (OAW+1)'(PKT_MAX + PKT_HDR_WORDS + PKT_TRL_WORDS);
endmodule
