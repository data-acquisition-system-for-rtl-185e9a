// proton_pkg: constants and types shared by the digitizers (ASF12eP, ASF48et),
// the concentrators (CCB12) and the serial links that join them.
//
// Everything runs on one 100 MHz system clock distributed down the tree. The
// 44-bit timestamp counts that clock, which makes it wrap after about 48 hours.
// Data travel in 16-bit words. The command codes, the event header and the
// packet layout defined here are this design's own choices: the system
// description names the commands and the header fields but not their encoding.
package proton_pkg;

  localparam int TS_W    = 44;   // timestamp width
  localparam int ADC_W   = 12;   // flash ADC reading
  localparam int WORD_W  = 16;   // serial link payload / FIFO word
  localparam int LEN_W   = 12;   // readings per event (up to 4000)
  localparam int HDR_WORDS = 5;  // event header length in words

  typedef logic [TS_W-1:0]   ts_t;
  typedef logic [WORD_W-1:0] word_t;

  // Commands carried in the low byte of a command frame.
  typedef enum logic [7:0] {
    CMD_NOP       = 8'h00,
    CMD_START_RUN = 8'h01,
    CMD_STOP_RUN  = 8'h02,
    CMD_TRIGGER   = 8'h03,
    CMD_HOLD      = 8'h04,
    CMD_RESUME    = 8'h05,
    CMD_BUSY_ON   = 8'h06,
    CMD_BUSY_OFF  = 8'h07
  } cmd_e;

  // Trigger-request source of a digitizer channel.
  typedef enum logic [1:0] {
    TR_OFF  = 2'd0,
    TR_AMP  = 2'd1,
    TR_MIW  = 2'd2,
    TR_COIN = 2'd3
  } tr_mode_e;

  // Run-time settings of a TPC (ASF12eP) digitizer, common to its channels.
  typedef struct packed {
    logic [ADC_W-1:0] amp_thr;    // amplitude discriminator threshold
    logic [6:0]       miw_width;  // moving window length, 1..127 readings
    logic [14:0]      miw_thr;    // threshold on the 15 MSBs of the window sum
    logic [9:0]       delay;      // pipeline delay = pre-trigger part, readings
    logic [LEN_W-1:0] len;        // readings per event (typ. 1000, max 4000)
  } ep_cfg_t;

  // Run-time settings of a tracker (ASF48et) digitizer, common to its channels.
  typedef struct packed {
    logic [ADC_W-1:0] thr;        // self-trigger threshold
    logic [9:0]       delay;      // readings kept before the self-trigger
    logic [LEN_W-1:0] len;        // readings per event (typ. 80, max 960)
    logic [15:0]      window;     // look-back window before a trigger, clock ticks
  } et_cfg_t;

  // Event header word i (0..4) for channel ch, length len, timestamp ts.
  function automatic word_t event_header(input int i, input logic [5:0] ch,
                                         input logic [LEN_W-1:0] len, input ts_t ts);
    case (i)
      0:       return {2'b11, ch, 8'h00};
      1:       return {4'h0, len};
      2:       return {4'h0, ts[43:32]};
      3:       return ts[31:16];
      default: return ts[15:0];
    endcase
  endfunction

  // Trigger-record stream of the Master: one record per trigger request.
  localparam int TRIG_REC_WORDS = 3;

  // Concentrator packet: 7 header words, payload, 4 trailer words.
  localparam int PKT_HDR_WORDS = 7;
  localparam int PKT_TRL_WORDS = 4;

endpackage
