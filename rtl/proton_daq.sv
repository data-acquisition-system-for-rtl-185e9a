// proton_daq: the data acquisition tree of the "Proton" ep-scattering set-up.
//
// Two detectors are read out. The time-projection chamber (TPC, 32 anode
// channels) is served by four ASF12eP digitizers; the forward tracker (FT,
// 2016 cathode strips) by 48 ASF48et digitizers of 48 channels (2304
// inputs, so 288 stay unused). One Master CCB12 concentrator sits at the
// root: its SPs 0-3 go to the four ASF12eP boards and its SPs 4-7 to four
// Slave CCB12s, each of which serves twelve ASF48et boards on its SPs 0-11
// (ET_PER_SLV; smaller values leave the upper SPs of a Slave unconnected).
// All links are 100 Mbps serial links running on the common system clock.
// The TPC's 32 channels occupy 8 of the 12 inputs of each ASF12eP.
// Operation: the host starts a run through the Master; "start run" flows
// down the tree and starts every timestamp counter. A TPC channel above its
// trigger threshold raises a trigger request; the requests of the four
// ASF12eP boards are ORed along the chain of auxiliary ports and reach the
// Master's trigger port from the last board. The Master turns a request into
// a "trigger" broadcast. Every ASF12eP channel then records a window of
// readings around the trigger, every ASF48et channel sends its self-triggered
// events of the preceding look-back window, and the data flow back up into
// the concentrators, which pack them for the Ethernet side. The output FIFO
// read ports of the five concentrators (index 0 = Master, 1..4 = Slaves)
// are the outputs of this module; the processor and network beyond them are
// not part of it.
module proton_daq
  import proton_pkg::*;
#(
  parameter int unsigned NEP         = 4,
  parameter int unsigned EP_NCH      = 12,
  parameter int unsigned EP_CH_FIFO  = 8192,
  parameter int unsigned EP_DEV_FIFO = 32768,
  parameter int unsigned NSLV        = 4,
  parameter int unsigned ET_PER_SLV  = 12,
  parameter int unsigned ET_NCH      = 48,
  parameter int unsigned ET_RING     = 1024,
  parameter int unsigned ET_OUT_FIFO = 16384,
  parameter int unsigned DELAY_DEPTH = 1024,
  parameter int unsigned CCB_IN_FIFO = 16384,
  parameter int unsigned CCB_OUT_FIFO = 32768,
  parameter int unsigned PKT_MAX     = 1024,
  localparam int unsigned NET        = NSLV * ET_PER_SLV,
  localparam int unsigned NCCB       = NSLV + 1,
  localparam int unsigned OAW        = $clog2(CCB_OUT_FIFO)
) (
  input  logic              clk,
  input  logic              rst,
  // TPC digitizers: ADC serial inputs and settings
  input  logic              ep_lclk  [NEP],
  input  logic              ep_frame [NEP],
  input  logic [EP_NCH-1:0] ep_d_rise [NEP],
  input  logic [EP_NCH-1:0] ep_d_fall [NEP],
  input  ep_cfg_t           ep_cfg   [NEP],
  input  tr_mode_e          ep_tr_mode [NEP][EP_NCH],
  // FT digitizers
  input  logic              et_lclk  [NET],
  input  logic              et_frame [NET],
  input  logic [ET_NCH-1:0] et_d_rise [NET],
  input  logic [ET_NCH-1:0] et_d_fall [NET],
  input  et_cfg_t           et_cfg   [NET],
  // host commands into the Master
  input  logic              host_cmd_valid,
  input  cmd_e              host_cmd,
  output logic              host_cmd_ready,
  input  logic [31:0]       min_gap,
  // concentrator output FIFOs (0 = Master)
  output logic              out_valid [NCCB],
  output word_t             out_data  [NCCB],
  input  logic              out_rd    [NCCB],
  output logic [OAW:0]      out_count [NCCB],
  // status
  output logic              ccb_busy  [NCCB],
  output logic [15:0]       ccb_packets [NCCB],
  output logic [15:0]       ccb_holds [NCCB][12],
  output logic [15:0]       n_tr,
  output logic [15:0]       n_trig,
  output logic [15:0]       n_busy_rej,
  output logic [15:0]       ep_events  [NEP][EP_NCH],
  output logic [15:0]       ep_dropped [NEP][EP_NCH],
  output logic [15:0]       ep_ignored [NEP][EP_NCH],
  output logic [15:0]       et_captured [NET][ET_NCH],
  output logic [15:0]       et_lost     [NET][ET_NCH],
  output logic [15:0]       et_sent     [NET][ET_NCH],
  output logic              ep_running [NEP],
  output logic              et_running [NET]
);
  logic [NEP:0]  tr_chain;
  logic [11:0]   m_sdo, m_sdi;
  logic [11:0]   s_sdo [NSLV];
  logic [11:0]   s_sdi [NSLV];
  logic [NSLV-1:0] s_usp_up;
  logic [NEP-1:0]  ep_up;

  assign tr_chain[0] = 1'b0;

  // ---------------- TPC digitizers on Master SPs 0..NEP-1
  for (genvar b = 0; b < NEP; b++) begin : g_ep
    logic hold_unused;
    logic [$clog2(EP_DEV_FIFO):0] dc_unused;
    asf12ep #(.NCH(EP_NCH), .CH_FIFO(EP_CH_FIFO), .DEV_FIFO(EP_DEV_FIFO),
              .DELAY_DEPTH(DELAY_DEPTH), .CH_BASE(6'(b * EP_NCH))) u_ep (
      .clk, .rst, .lclk(ep_lclk[b]), .frame(ep_frame[b]),
      .d_rise(ep_d_rise[b]), .d_fall(ep_d_fall[b]), .cfg(ep_cfg[b]), .tr_mode(ep_tr_mode[b]),
      .sdi(m_sdo[b]), .sdo(ep_up[b]), .tr_in(tr_chain[b]), .tr_out(tr_chain[b+1]),
      .running(ep_running[b]), .hold(hold_unused),
      .n_events(ep_events[b]), .n_dropped(ep_dropped[b]), .n_ignored(ep_ignored[b]),
      .dev_count(dc_unused)
    );
  end

  // ---------------- Master
  logic [11:0] m_slave_mask;
  always_comb begin
    m_slave_mask = '0;
    for (int s = 0; s < int'(NSLV); s++) m_slave_mask[NEP + s] = 1'b1;
  end

  always_comb begin
    m_sdi = '0;
    for (int b = 0; b < int'(NEP); b++) m_sdi[b] = ep_up[b];
    for (int s = 0; s < int'(NSLV); s++) m_sdi[NEP + s] = s_usp_up[s];
  end

  ccb12 #(.MASTER(1'b1), .NSP(12), .IN_FIFO(CCB_IN_FIFO), .OUT_FIFO(CCB_OUT_FIFO), .PKT_MAX(PKT_MAX)) u_master (
    .clk, .rst, .usp_sdi(1'b0), .usp_sdo(),
    .host_cmd_valid, .host_cmd, .host_cmd_ready,
    .tp_tr(tr_chain[NEP]), .min_gap,
    .sp_slave(m_slave_mask), .sp_sdo(m_sdo), .sp_sdi(m_sdi),
    .out_valid(out_valid[0]), .out_data(out_data[0]), .out_rd(out_rd[0]), .out_count(out_count[0]),
    .running(), .busy(ccb_busy[0]), .n_holds(ccb_holds[0]), .n_packets(ccb_packets[0]),
    .n_tr, .n_trig, .n_busy_rej
  );

  // ---------------- Slaves and FT digitizers
  for (genvar s = 0; s < NSLV; s++) begin : g_slv
    logic        hrdy_unused;
    logic [15:0] ntr_u, ntrig_u, nrej_u;
    ccb12 #(.MASTER(1'b0), .NSP(12), .IN_FIFO(CCB_IN_FIFO), .OUT_FIFO(CCB_OUT_FIFO), .PKT_MAX(PKT_MAX)) u_slave (
      .clk, .rst, .usp_sdi(m_sdo[NEP + s]), .usp_sdo(s_usp_up[s]),
      .host_cmd_valid(1'b0), .host_cmd(CMD_NOP), .host_cmd_ready(hrdy_unused),
      .tp_tr(1'b0), .min_gap(32'd0),
      .sp_slave(12'h000), .sp_sdo(s_sdo[s]), .sp_sdi(s_sdi[s]),
      .out_valid(out_valid[s+1]), .out_data(out_data[s+1]), .out_rd(out_rd[s+1]), .out_count(out_count[s+1]),
      .running(), .busy(ccb_busy[s+1]), .n_holds(ccb_holds[s+1]), .n_packets(ccb_packets[s+1]),
      .n_tr(ntr_u), .n_trig(ntrig_u), .n_busy_rej(nrej_u)
    );

    for (genvar e = 0; e < ET_PER_SLV; e++) begin : g_et
      localparam int unsigned B = s * ET_PER_SLV + e;
      logic hold_unused;
      logic [$clog2(ET_OUT_FIFO):0] oc_unused;
      asf48et #(.NCH(ET_NCH), .RING_DEPTH(ET_RING), .OUT_FIFO(ET_OUT_FIFO), .DELAY_DEPTH(DELAY_DEPTH)) u_et (
        .clk, .rst, .lclk(et_lclk[B]), .frame(et_frame[B]),
        .d_rise(et_d_rise[B]), .d_fall(et_d_fall[B]), .cfg(et_cfg[B]),
        .sdi(s_sdo[s][e]), .sdo(s_sdi[s][e]),
        .running(et_running[B]), .hold(hold_unused),
        .n_captured(et_captured[B]), .n_lost(et_lost[B]), .n_sent(et_sent[B]),
        .out_count(oc_unused)
      );
    end
    for (genvar e = ET_PER_SLV; e < 12; e++) begin : g_unused
      assign s_sdi[s][e] = 1'b0;
    end
  end
endmodule
