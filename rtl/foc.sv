// foc: FOFB controller (FOC) of one station.
//
// Every fast-acquisition (FA) cycle the controller gathers the whole orbit, computes the
// corrector setpoints of its station and hands them to the power-supply interface.
//  * BPM links: N_LINK links from the BPM data transceivers of the station's cells, each
//    buffered in a FIFO, feed the ring node as local traffic.
//  * FOFB ring: the ring node forwards other stations' samples and injects the local
//    ones; everything it passes on is written into the orbit memory (N_BPM entries). A
//    flag per entry, cleared by the FA trigger, marks samples of the current cycle.
//  * Sequencer: an FA trigger starts the cycle. After `bpm_wait` cycles (time for the
//    ring to deliver all samples) the orbit memory is read in index order, LANES (2)
//    BPMs per cycle from memories banked by index modulo LANES, which brings the
//    correction calculation under the 392 clock edges of the reference system; the error
//    e = position - reference orbit (zero for a missing or unaligned BPM) streams into two
//    systolic arrays, one per plane, holding the inverse response matrix rows of the
//    station's N_FC correctors. The PID stage turns the 2*N_FC products into 24-bit
//    setpoints, which are sent to the power supplies if feedback is on.
//  * Registers: a write bus from the control server sets the matrices, reference orbits,
//    gains, timing and mode (address map in fofb_pkg).
// Outputs: `fofb_start` pulses when the calculation starts and `fofb_finish` when the
// setpoints are out; `latency` holds the clock edges from the one that takes the FA
// trigger to the one that raises `fofb_finish`.
// The store stream is also given out for data acquisition. The division of work, the
// systolic correction, PID gains per plane, the BPM waiting time (default 0x3E7) and the
// setpoint bit position (default 24) follow the system description; the register map,
// the per-entry cycle flags, the banking and the sequencing details are this design's
// choices. A trigger that arrives while a cycle is still running is not started and is
// counted in `overrun_cnt`.
module foc
  import fofb_pkg::*;
#(
  parameter int N_LINK     = N_CELLS_UNIT,
  parameter int N_BPM      = N_BPM_TOTAL,
  parameter int N_FC       = N_FC_PLANE,
  parameter int FIFO_DEPTH = 64,
  parameter int LANES      = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              trig_fa,
  input  cfg_wr_t           cfg,
  // BPM links from the data transceivers
  input  logic [N_LINK-1:0] bdt_valid,
  input  bpm_pkt_t          bdt_pkt [N_LINK],
  // FOFB ring
  input  logic              up_valid,
  input  bpm_pkt_t          up_pkt,
  output logic              dn_valid,
  output bpm_pkt_t          dn_pkt,
  // power-supply interface
  output logic              psc_start,
  output logic [7:0]        psc_id,
  output logic [SP_W-1:0]   psc_cmd,
  output logic [SP_W-1:0]   setpoint [2*N_FC],
  input  logic              psc_done,
  // data acquisition: every sample stored this cycle
  output logic              daq_valid,
  output bpm_pkt_t          daq_pkt,
  // status
  output logic              fofb_start,
  output logic              fofb_finish,
  output logic [15:0]       latency,
  output logic [15:0]       bpm_ok_cnt,
  output logic [15:0]       overrun_cnt,
  output logic [15:0]       link_overflow_cnt,
  output logic [15:0]       ring_stall_cnt,
  output logic [15:0]       ring_fwd_cnt,
  output logic [15:0]       ring_inj_cnt,
  output logic [15:0]       ring_drop_cnt,
  output logic [2*N_FC-1:0] sp_sat
);
  localparam int BW = $clog2(N_BPM);
  localparam int RW = $clog2(N_FC);
  localparam int NG = N_BPM / LANES;        // BPM groups read per cycle in the feed
  localparam int GW = (NG > 1) ? $clog2(NG) : 1;

  // ---------------- configuration registers ----------------
  logic              fb_on, clear_int;
  logic [15:0]       bpm_wait;
  logic [5:0]        trunc;
  logic [UNIT_W-1:0] unit_id;
  logic signed [31:0] kp_x, ki_x, kd_x, kp_y, ki_y, kd_y;
  logic [3:0]        region;

  assign region = cfg.addr[19:16];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fb_on     <= 1'b0;
      clear_int <= 1'b0;
      bpm_wait  <= 16'h03E7;
      trunc     <= 6'd24;
      psc_id    <= ID_SET_SP;
      psc_cmd   <= '0;
      unit_id   <= '0;
      kp_x <= '0; ki_x <= '0; kd_x <= '0;
      kp_y <= '0; ki_y <= '0; kd_y <= '0;
    end else begin
      clear_int <= 1'b0;
      if (cfg.we && region == REG_REGION) begin
        unique case (cfg.addr[15:0])
          REG_CTRL: begin
            fb_on     <= cfg.wdata[0];
            clear_int <= cfg.wdata[1] || !cfg.wdata[0];
          end
          REG_BPM_WAIT: bpm_wait <= cfg.wdata[15:0];
          REG_TRUNC:    trunc    <= (cfg.wdata[5:0] > 6'd32) ? 6'd32 : cfg.wdata[5:0];
          REG_PSC_ID:   psc_id   <= cfg.wdata[7:0];
          REG_PSC_CMD:  psc_cmd  <= cfg.wdata[SP_W-1:0];
          REG_X_KP:     kp_x     <= cfg.wdata;
          REG_X_KI:     ki_x     <= cfg.wdata;
          REG_X_KD:     kd_x     <= cfg.wdata;
          REG_Y_KP:     kp_y     <= cfg.wdata;
          REG_Y_KI:     ki_y     <= cfg.wdata;
          REG_Y_KD:     kd_y     <= cfg.wdata;
          REG_UNIT_ID:  unit_id  <= cfg.wdata[UNIT_W-1:0];
          default: ;
        endcase
      end
    end
  end

  // ---------------- BPM link buffers and ring node ----------------
  logic [N_LINK-1:0] loc_valid, loc_ready, fifo_empty;
  bpm_pkt_t          loc_pkt [N_LINK];
  logic [15:0]       ovf [N_LINK];
  logic              st_valid;
  bpm_pkt_t          st_pkt;

  for (genvar l = 0; l < N_LINK; l++) begin : g_link
    logic fifo_full;
    fifo_sync #(.T(bpm_pkt_t), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en(bdt_valid[l]), .wr_data(bdt_pkt[l]),
      .rd_en(loc_ready[l]), .rd_data(loc_pkt[l]),
      .empty(fifo_empty[l]), .full(fifo_full), .overflow_cnt(ovf[l])
    );
    assign loc_valid[l] = !fifo_empty[l];
  end

  always_comb begin
    link_overflow_cnt = '0;
    for (int l = 0; l < N_LINK; l++) link_overflow_cnt = link_overflow_cnt + ovf[l];
  end

  fofb_ring_node #(.N_LOCAL(N_LINK)) u_ring (
    .clk, .rst_n, .unit_id,
    .up_valid, .up_pkt, .dn_valid, .dn_pkt,
    .loc_valid, .loc_pkt, .loc_ready,
    .st_valid, .st_pkt,
    .fwd_cnt(ring_fwd_cnt), .inj_cnt(ring_inj_cnt), .drop_cnt(ring_drop_cnt),
    .stall_cnt(ring_stall_cnt)
  );

  assign daq_valid = st_valid;
  assign daq_pkt   = st_pkt;

  // ---------------- orbit memory ----------------
  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_FEED, S_CALC, S_PID, S_PSC} state_t;
  state_t state;
  logic [N_BPM-1:0]        orb_ok;            // sample of this cycle, marked ok
  logic                    st_in_range;
  logic                    new_cycle;

  assign st_in_range = st_valid && (st_pkt.idx < IDX_W'(N_BPM));
  assign new_cycle   = (state == S_IDLE) && trig_fa;

  // One flag per BPM, cleared by the trigger that starts a cycle and set by the sample
  // that arrives in it; a sample stored in the same clock as the trigger counts for the
  // new cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      orb_ok <= '0;
    end else begin
      if (new_cycle) orb_ok <= '0;
      if (st_in_range) orb_ok[st_pkt.idx[BW-1:0]] <= st_pkt.ok;
    end
  end

  // ---------------- sequencer ----------------

  logic [15:0]  wait_cnt, lat_cnt;
  logic [GW-1:0] rd_grp;     // group of LANES BPMs read this cycle
  logic          rd_v;       // a read was issued last cycle
  logic [LANES-1:0] ok_q;
  logic [$clog2(LANES+1)-1:0] n_ok;
  logic          mv_start, pid_start;
  logic          feed_valid;
  logic signed [BPM_W-1:0] ex [LANES];
  logic signed [BPM_W-1:0] ey [LANES];
  logic          done_x, done_y, got_x, got_y, pid_done;
  logic signed [63:0] res_x [N_FC];
  logic signed [63:0] res_y [N_FC];
  logic signed [63:0] pid_in [2*N_FC];

  // Orbit and reference-orbit memories, banked by lane: bank l holds the BPMs whose
  // index is l modulo LANES, so one group of LANES neighbours is read per cycle.
  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic signed [BPM_W-1:0] orb_x [NG];
    logic signed [BPM_W-1:0] orb_y [NG];
    logic signed [BPM_W-1:0] ofs_x [NG];
    logic signed [BPM_W-1:0] ofs_y [NG];
    logic signed [BPM_W-1:0] rx_q, ry_q, ox_q, oy_q;
    logic                    ok_l;
    logic                    st_here, cfg_here;
    logic [GW-1:0]           st_grp, cfg_grp;

    assign st_here  = st_in_range && (32'(st_pkt.idx) % LANES == l);
    assign st_grp   = GW'(32'(st_pkt.idx) / LANES);
    assign cfg_here = (32'(cfg.addr[BW-1:0]) < N_BPM) && (32'(cfg.addr[BW-1:0]) % LANES == l);
    assign cfg_grp  = GW'(32'(cfg.addr[BW-1:0]) / LANES);

    always_ff @(posedge clk) begin
      if (st_here) begin
        orb_x[st_grp] <= st_pkt.x;
        orb_y[st_grp] <= st_pkt.y;
      end
      if (cfg.we && region == OFSX_REGION && cfg_here) ofs_x[cfg_grp] <= cfg.wdata;
      if (cfg.we && region == OFSY_REGION && cfg_here) ofs_y[cfg_grp] <= cfg.wdata;
      rx_q <= orb_x[rd_grp];
      ry_q <= orb_y[rd_grp];
      ox_q <= ofs_x[rd_grp];
      oy_q <= ofs_y[rd_grp];
      ok_l <= orb_ok[32'(rd_grp) * LANES + l];
    end

    assign ok_q[l] = ok_l;
    assign ex[l]   = ok_l ? rx_q - ox_q : '0;
    assign ey[l]   = ok_l ? ry_q - oy_q : '0;
  end

  always_comb begin
    n_ok = '0;
    for (int l = 0; l < LANES; l++) n_ok = n_ok + ok_q[l];
  end

  assign feed_valid = rd_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      wait_cnt    <= '0;
      lat_cnt     <= '0;
      latency     <= '0;
      rd_grp      <= '0;
      rd_v        <= 1'b0;
      mv_start    <= 1'b0;
      pid_start   <= 1'b0;
      psc_start   <= 1'b0;
      got_x       <= 1'b0;
      got_y       <= 1'b0;
      fofb_start  <= 1'b0;
      fofb_finish <= 1'b0;
      overrun_cnt <= '0;
      bpm_ok_cnt  <= '0;
    end else begin
      mv_start    <= 1'b0;
      pid_start   <= 1'b0;
      psc_start   <= 1'b0;
      fofb_start  <= 1'b0;
      fofb_finish <= 1'b0;
      rd_v        <= 1'b0;
      if (state != S_IDLE) lat_cnt <= lat_cnt + 1'b1;
      if (trig_fa && state != S_IDLE) overrun_cnt <= overrun_cnt + 1'b1;
      if (rd_v) bpm_ok_cnt <= bpm_ok_cnt + 16'(n_ok);
      unique case (state)
        S_IDLE: if (trig_fa) begin
          wait_cnt <= '0;
          lat_cnt  <= 16'd1;
          state    <= S_WAIT;
        end
        S_WAIT: begin
          wait_cnt <= wait_cnt + 1'b1;
          if (wait_cnt >= bpm_wait) begin
            mv_start   <= 1'b1;
            fofb_start <= 1'b1;
            rd_grp     <= '0;
            bpm_ok_cnt <= '0;
            got_x      <= 1'b0;
            got_y      <= 1'b0;
            state      <= S_FEED;
          end
        end
        S_FEED: begin
          rd_v <= 1'b1;
          if (rd_grp == GW'(NG - 1)) state <= S_CALC;
          else rd_grp <= rd_grp + 1'b1;
        end
        S_CALC: begin
          if (done_x) got_x <= 1'b1;
          if (done_y) got_y <= 1'b1;
          if ((got_x || done_x) && (got_y || done_y)) begin
            pid_start <= 1'b1;
            state     <= S_PID;
          end
        end
        S_PID: if (pid_done) begin
          if (fb_on) begin
            psc_start <= 1'b1;
            state     <= S_PSC;
          end else begin
            fofb_finish <= 1'b1;
            latency     <= lat_cnt;
            state       <= S_IDLE;
          end
        end
        S_PSC: if (psc_done) begin
          fofb_finish <= 1'b1;
          latency     <= lat_cnt;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- correction: one systolic array per plane ----------------
  logic mw_x, mw_y;
  assign mw_x = cfg.we && region == MATX_REGION;
  assign mw_y = cfg.we && region == MATY_REGION;

  sa_matvec #(.N_IN(N_BPM), .N_OUT(N_FC), .LANES(LANES), .DATA_W(BPM_W), .COEF_W(32), .ACC_W(64)) u_mv_x (
    .clk, .rst_n,
    .cw_we(mw_x), .cw_row(cfg.addr[10 +: RW]), .cw_col(cfg.addr[BW-1:0]), .cw_data(cfg.wdata),
    .start(mv_start), .in_valid(feed_valid), .in_data(ex),
    .done(done_x), .result(res_x)
  );

  sa_matvec #(.N_IN(N_BPM), .N_OUT(N_FC), .LANES(LANES), .DATA_W(BPM_W), .COEF_W(32), .ACC_W(64)) u_mv_y (
    .clk, .rst_n,
    .cw_we(mw_y), .cw_row(cfg.addr[10 +: RW]), .cw_col(cfg.addr[BW-1:0]), .cw_data(cfg.wdata),
    .start(mv_start), .in_valid(feed_valid), .in_data(ey),
    .done(done_y), .result(res_y)
  );

  always_comb begin
    for (int j = 0; j < N_FC; j++) begin
      pid_in[j]        = res_x[j];
      pid_in[N_FC + j] = res_y[j];
    end
  end

  fofb_pid #(.N_CH(2 * N_FC), .IN_W(64), .GAIN_W(32), .GAIN_FRAC(16)) u_pid (
    .clk, .rst_n,
    .start(pid_start), .clear_int,
    .err(pid_in),
    .kp_x, .ki_x, .kd_x, .kp_y, .ki_y, .kd_y,
    .trunc,
    .setpoint, .sat(sp_sat), .done(pid_done)
  );
endmodule
