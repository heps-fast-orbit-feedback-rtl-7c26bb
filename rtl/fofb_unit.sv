// fofb_unit: one station of the fast orbit feedback, the system's top level.
//
// A station serves three cells of the ring. For each cell a BPM data transceiver (bdt)
// collects the 12 BPMs point to point and sends them on one link to the FOFB controller
// (foc). The controller joins the FOFB ring of the 16 stations, so it sees the full orbit
// of 576 BPMs, computes the 24 corrector setpoints of its 3 cells each FA cycle and hands
// them to the power-supply interface (psc_interface), which drives the 24 fast
// power-supply controllers over serial links and reads their status back. The auxiliary
// logic (aux) turns the timing-system triggers into pulses (the FA trigger starts each
// cycle) and switches the station off on over-temperature. This "star-ring" arrangement
// and the split into these boards follow the system description.
// Outside this module: the BPMs, the neighbouring stations on the ring, the power-supply
// controllers, the timing system, the temperature sensors and the control server (the
// configuration write bus and the data-acquisition stream), and the serial transceivers
// of all fibre links, which are modelled here as parallel streams.
// Triggers: trig_in[0] 291 Hz, [1] FA, [2] Sync, [3] DAQ.
// The combinational readback port (rb_link, rb_kind -> rb_data) for the control server is
// this design's choice; the readback set itself follows the power-supply protocol.
module fofb_unit
  import fofb_pkg::*;
#(
  parameter int N_CELL       = N_CELLS_UNIT,
  parameter int N_BPM        = N_BPM_STATION,
  parameter int N_XBPM       = 0,
  parameter int N_BPM_RING   = N_BPM_TOTAL,
  parameter int N_FC         = N_FC_PLANE,
  parameter int CLKS_PER_BIT = 4,
  parameter int PSC_TIMEOUT  = 2000,
  parameter int BDT_TIMEOUT  = 500,
  parameter int FIFO_DEPTH   = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // BPMs of the three cells
  input  logic [N_CELL*(N_BPM+N_XBPM)-1:0] bpm_valid,
  input  bpm_fa_t           bpm_data  [N_CELL*(N_BPM+N_XBPM)],
  input  logic [IDX_W-1:0]  bpm_base  [N_CELL],
  input  logic [IDX_W-1:0]  xbpm_base [N_CELL],
  // FOFB ring
  input  logic              ring_in_valid,
  input  bpm_pkt_t          ring_in,
  output logic              ring_out_valid,
  output bpm_pkt_t          ring_out,
  // power-supply controllers
  output logic [2*N_FC-1:0] psc_txd,
  input  logic [2*N_FC-1:0] psc_rxd,
  // timing and temperatures
  input  logic [3:0]        trig_in,
  input  logic [2:0]        temp_valid,
  input  logic [11:0]       temp [3],
  input  logic [11:0]       temp_limit,
  input  logic              temp_clear,
  output logic              power_off,
  // control server
  input  cfg_wr_t           cfg,
  output logic              daq_valid,
  output bpm_pkt_t          daq_pkt,
  // status
  output logic              fofb_start,
  output logic              fofb_finish,
  output logic [15:0]       latency,
  output logic [SP_W-1:0]   setpoint   [2*N_FC],
  output logic [SP_W-1:0]   rb_current [2*N_FC],
  input  logic [4:0]        rb_link,
  input  logic [2:0]        rb_kind,
  output logic [SP_W-1:0]   rb_data,
  output logic [2*N_FC-1:0] psc_link_ok,
  output logic [15:0]       psc_crc_err,
  output logic [15:0]       psc_timeout,
  output logic [15:0]       bpm_missing,
  output logic [15:0]       bpm_misaligned,
  output logic [15:0]       bpm_ok_cnt,
  output logic [15:0]       overrun_cnt,
  output logic [15:0]       ring_stall_cnt,
  output logic [15:0]       ring_drop_cnt
);
  localparam int NIN = N_BPM + N_XBPM;

  // ---------------- triggers and protection ----------------
  logic [3:0]  trig_p;
  logic [15:0] trig_cnt [4];
  logic [2:0]  over_temp;
  logic [11:0] temp_max [3];

  aux #(.N_TRIG(4), .N_TEMP(3), .TEMP_W(12), .DEBOUNCE(4)) u_aux (
    .clk, .rst_n,
    .trig_in, .trig_out(trig_p), .trig_cnt,
    .temp_valid, .temp, .temp_limit, .clear(temp_clear),
    .over_temp, .temp_max, .power_off
  );

  // ---------------- BPM data transceivers ----------------
  logic [N_CELL-1:0] bdt_valid;
  bpm_pkt_t          bdt_pkt [N_CELL];
  logic [15:0]       miss_c [N_CELL], mis_c [N_CELL], burst_c [N_CELL];

  for (genvar c = 0; c < N_CELL; c++) begin : g_bdt
    logic [NIN-1:0] v;
    bpm_fa_t        d [NIN];
    for (genvar k = 0; k < NIN; k++) begin : g_in
      assign v[k] = bpm_valid[c * NIN + k];
      assign d[k] = bpm_data[c * NIN + k];
    end
    // the link into the controller has no back-pressure; its FIFO absorbs a burst
    bdt #(.N_BPM(N_BPM), .N_XBPM(N_XBPM), .TIMEOUT(BDT_TIMEOUT)) u_bdt (
      .clk, .rst_n,
      .base_idx(bpm_base[c]), .xbpm_idx(xbpm_base[c]),
      .in_valid(v), .in_data(d),
      .out_valid(bdt_valid[c]), .out_pkt(bdt_pkt[c]), .out_ready(1'b1),
      .missing_cnt(miss_c[c]), .misaligned_cnt(mis_c[c]), .burst_cnt(burst_c[c])
    );
  end

  always_comb begin
    bpm_missing    = '0;
    bpm_misaligned = '0;
    for (int c = 0; c < N_CELL; c++) begin
      bpm_missing    = bpm_missing + miss_c[c];
      bpm_misaligned = bpm_misaligned + mis_c[c];
    end
  end

  // ---------------- FOFB controller ----------------
  logic            psc_start, psc_done, psc_busy;
  logic [7:0]      psc_id;
  logic [SP_W-1:0] psc_cmd;
  logic [15:0]     link_ovf, ring_fwd, ring_inj;
  logic [2*N_FC-1:0] sp_sat;

  foc #(.N_LINK(N_CELL), .N_BPM(N_BPM_RING), .N_FC(N_FC), .FIFO_DEPTH(FIFO_DEPTH)) u_foc (
    .clk, .rst_n,
    .trig_fa(trig_p[1] && !power_off),
    .cfg,
    .bdt_valid, .bdt_pkt,
    .up_valid(ring_in_valid), .up_pkt(ring_in),
    .dn_valid(ring_out_valid), .dn_pkt(ring_out),
    .psc_start, .psc_id, .psc_cmd, .setpoint, .psc_done,
    .daq_valid, .daq_pkt,
    .fofb_start, .fofb_finish, .latency, .bpm_ok_cnt, .overrun_cnt,
    .link_overflow_cnt(link_ovf), .ring_stall_cnt,
    .ring_fwd_cnt(ring_fwd), .ring_inj_cnt(ring_inj), .ring_drop_cnt,
    .sp_sat
  );

  // ---------------- power-supply interface ----------------
  logic [SP_W-1:0] rb_status [2*N_FC];
  logic [SP_W-1:0] rb_spback [2*N_FC];
  logic [SP_W-1:0] rb_command [2*N_FC];
  logic [SP_W-1:0] rb_version [2*N_FC];
  logic [SP_W-1:0] rb_config  [2*N_FC];

  psc_interface #(.N(2 * N_FC), .CLKS_PER_BIT(CLKS_PER_BIT), .TIMEOUT(PSC_TIMEOUT)) u_psc (
    .clk, .rst_n,
    .start(psc_start), .req_id(psc_id), .cmd_data(psc_cmd), .setpoint,
    .busy(psc_busy), .done(psc_done),
    .txd(psc_txd), .rxd(psc_rxd),
    .rb_status, .rb_current, .rb_spback, .rb_command, .rb_version, .rb_config,
    .link_ok(psc_link_ok), .crc_err_total(psc_crc_err), .timeout_total(psc_timeout)
  );

  // Readback port for the control server: rb_kind 0 status, 1 current, 2 command,
  // 3 setpoint, 4 version, 5 configuration, of power supply rb_link (0 for a link
  // number outside the station).
  always_comb begin
    rb_data = '0;
    if (32'(rb_link) < 2 * N_FC) begin
      unique case (rb_kind)
        3'd0:    rb_data = rb_status[rb_link];
        3'd1:    rb_data = rb_current[rb_link];
        3'd2:    rb_data = rb_command[rb_link];
        3'd3:    rb_data = rb_spback[rb_link];
        3'd4:    rb_data = rb_version[rb_link];
        3'd5:    rb_data = rb_config[rb_link];
        default: rb_data = '0;
      endcase
    end
  end
endmodule
