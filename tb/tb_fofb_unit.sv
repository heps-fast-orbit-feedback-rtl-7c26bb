// tb_fofb_unit: one complete FOFB station at its full size (3 cells of 12 BPMs, a ring
// of 576 BPMs, 12 correctors per plane, 24 power-supply links), end to end.
// The testbench plays the 36 BPMs, the other 15 stations on the ring (and returns this
// station's own packets after their trip), the timing triggers, the temperature sensors,
// the control server and 24 behavioural power-supply controllers. It loads the full
// inverse response matrices and reference orbits and runs several FA cycles. Each
// cycle's setpoints are checked against a matrix product computed in the testbench, and
// against what the power-supply controllers received. The cycle latency must stay under
// the 3500-cycle budget of the controller (35 us at 100 MHz), and the correction
// calculation (end of the BPM wait to the first start bit on a power-supply line) under
// 392 cycles and the 3.5 us algorithm time.
// Mechanisms made to happen and counted: ring stalls of local traffic, own packets
// dropped, a missing BPM, a BPM from the wrong FA cycle, a corrupted power-supply frame,
// a power-supply link timeout, setpoint saturation, a trigger overrun, both request modes
// (set-only and set-and-read-back), feedback off, and an over-temperature shutdown.
module tb_fofb_unit;
  import fofb_pkg::*;
  localparam int UNIT = 2, NB = N_BPM_TOTAL, NC = 3, NBS = 12, NF = N_FC_PLANE, NP = 2 * NF;
  localparam int CPB = 4, PSC_TO = 2000;

  logic clk = 0, rst_n = 0;
  logic [NC*NBS-1:0] bpm_valid;
  bpm_fa_t           bpm_data [NC*NBS];
  logic [IDX_W-1:0]  bpm_base [NC], xbpm_base [NC];
  logic              ring_in_valid, ring_out_valid;
  bpm_pkt_t          ring_in, ring_out;
  logic [NP-1:0]     psc_txd, psc_rxd, m_txd, cut;
  logic [3:0]        trig_in;
  logic [2:0]        temp_valid;
  logic [11:0]       temp [3];
  logic [11:0]       temp_limit;
  logic              temp_clear, power_off;
  cfg_wr_t           cfg;
  logic              daq_valid;
  bpm_pkt_t          daq_pkt;
  logic              fofb_start, fofb_finish;
  logic [15:0]       latency;
  logic [SP_W-1:0]   setpoint [NP], rb_current [NP];
  logic [4:0]        rb_link;
  logic [2:0]        rb_kind;
  logic [SP_W-1:0]   rb_data;
  logic [NP-1:0]     psc_link_ok;
  logic [15:0]       psc_crc_err, psc_timeout, bpm_missing, bpm_misaligned, bpm_ok_cnt;
  logic [15:0]       overrun_cnt, ring_stall_cnt, ring_drop_cnt;
  logic [23:0]       model_sp [NP];

  fofb_unit dut (.*);

  for (genvar i = 0; i < NP; i++) begin : g_psc
    psc_model #(.CLKS_PER_BIT(CPB)) m (.clk, .rxd(psc_txd[i]), .txd(m_txd[i]));
    assign psc_rxd[i] = cut[i] ? 1'b1 : m_txd[i];
    assign model_sp[i] = m.sp;
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0, n_fin = 0, n_start = 0;
  logic signed [15:0] A [2][NF][NB];     // matrix entries kept small
  logic signed [31:0] ofs [2][NB];
  logic signed [31:0] pos [2][NB];
  bit okb [NB];
  bpm_pkt_t own_q [$];
  int n_daq = 0;
  int t_calc_start = 0, t_calc = 0;     // fofb_start to the first start bit on link 0
  logic txd0_q = 1'b1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic wr(input logic [3:0] region, input logic [15:0] a, input logic [31:0] d);
    @(posedge clk);
    cfg <= '{we: 1'b1, addr: {region, a}, wdata: d};
    @(posedge clk);
    cfg.we <= 1'b0;
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && fofb_finish) n_fin++;
    if (rst_n && fofb_start) n_start++;
    if (rst_n && fofb_start) t_calc_start <= cyc;
    txd0_q <= psc_txd[0];
    if (rst_n && txd0_q && !psc_txd[0] && t_calc_start != 0 && t_calc == 0) t_calc <= cyc - t_calc_start;
    if (rst_n && daq_valid) n_daq++;
    if (rst_n && ring_out_valid && ring_out.src == 4'(UNIT)) own_q.push_back(ring_out);
  end

  function automatic logic [23:0] ref_sp(input int p, input int j, input int trunc);
    longint acc, e;
    acc = 0;
    for (int i = 0; i < NB; i++) begin
      e = okb[i] ? longint'(pos[p][i]) - longint'(ofs[p][i]) : 0;
      acc += longint'(A[p][j][i]) * e;
    end
    acc = acc >>> trunc;
    if (acc > 8388607) return 24'h7FFFFF;
    if (acc < -8388608) return 24'h800000;
    return 24'(acc);
  endfunction

  // One FA cycle. `missing`: a local BPM that does not report; `late`: a local BPM that
  // reports a stale sequence number; `remote_bad`: a ring sample marked not ok.
  task automatic fa_cycle(input int seq, input int missing, input int late, input int remote_bad);
    for (int i = 0; i < NB; i++) begin
      pos[0][i] = 32'($signed($urandom % 20001) - 10000);
      pos[1][i] = 32'($signed($urandom % 20001) - 10000);
      okb[i] = (i != remote_bad);
    end
    for (int k = 0; k < NC * NBS; k++) begin
      int gi;
      gi = UNIT * NC * NBS + k;
      if (k == missing || k == late) okb[gi] = 1'b0;
    end
    @(posedge clk);
    trig_in[1] <= 1'b1;
    fork
      begin repeat (20) @(posedge clk); trig_in[1] <= 1'b0; end
      // local BPMs report at random times within 100 cycles
      begin
        logic [NC*NBS-1:0] todo;
        todo = '1;
        if (missing >= 0) todo[missing] = 1'b0;
        while (todo != '0) begin
          @(posedge clk);
          bpm_valid <= '0;
          for (int k = 0; k < NC * NBS; k++) begin
            if (todo[k] && $urandom % 8 == 0) begin
              int gi;
              gi = UNIT * NC * NBS + k;
              bpm_valid[k] <= 1'b1;
              bpm_data[k]  <= '{seq: 16'((k == late) ? seq - 1 : seq), x: pos[0][gi], y: pos[1][gi]};
              todo[k] = 1'b0;
            end
          end
        end
        @(posedge clk);
        bpm_valid <= '0;
      end
      // the rest of the ring: the other stations' samples, and our own coming back
      begin
        int i, back;
        i = 0;
        back = 0;
        repeat (5) @(posedge clk);
        while (i < NB || back < NC * NBS) begin
          @(posedge clk);
          ring_in_valid <= 1'b0;
          if (own_q.size() != 0 && $urandom % 3 == 0) begin
            ring_in_valid <= 1'b1;
            ring_in       <= own_q.pop_front();
            back++;
          end else if (i < NB) begin
            if (i / (NC * NBS) == UNIT) i = i + NC * NBS;
            if (i < NB) begin
              ring_in_valid <= 1'b1;
              ring_in <= '{src: 4'((i / (NC * NBS))), idx: 10'(i), ok: okb[i],
                           x: pos[0][i], y: pos[1][i]};
              i++;
            end
          end
        end
        @(posedge clk);
        ring_in_valid <= 1'b0;
      end
    join
  endtask

  task automatic wait_finish(input int n0);
    while (n_fin == n0) @(posedge clk);
    @(posedge clk);
  endtask

  task automatic check_setpoints(input int trunc, input string what);
    for (int p = 0; p < 2; p++)
      for (int j = 0; j < NF; j++)
        chk(setpoint[p * NF + j] == ref_sp(p, j, trunc), what);
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0, n1, f0, n_sat, n_modes;
    int c_stall, c_drop, c_missing, c_misaligned, c_crc, c_timeout, c_sat, c_overrun, c_off, c_temp, c_fboff;
    bpm_valid = '0; ring_in_valid = 0; ring_in = '0; cut = '0; trig_in = '0;
    temp_valid = '0; temp_limit = 12'd700; temp_clear = 0; cfg = '0; rb_link = '0; rb_kind = '0;
    for (int s = 0; s < 3; s++) temp[s] = 12'd400;
    for (int k = 0; k < NC * NBS; k++) bpm_data[k] = '0;
    for (int c = 0; c < NC; c++) begin
      bpm_base[c]  = 10'(UNIT * NC * NBS + c * NBS);
      xbpm_base[c] = 10'(NB + c);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // configuration from the control server
    wr(REG_REGION, REG_UNIT_ID, UNIT);
    wr(REG_REGION, REG_TRUNC, 4);
    wr(REG_REGION, REG_X_KP, 32'sd65536);
    wr(REG_REGION, REG_Y_KP, 32'sd65536);
    for (int p = 0; p < 2; p++)
      for (int i = 0; i < NB; i++) begin
        ofs[p][i] = 32'($signed($urandom % 2001) - 1000);
        wr(p ? OFSY_REGION : OFSX_REGION, 16'(i), ofs[p][i]);
        for (int j = 0; j < NF; j++) begin
          A[p][j][i] = 16'($signed($urandom % 401) - 200);
          if (p == 1 && j == 5) A[p][j][i] = 16'sd32000;   // drives channel 17 into saturation
          wr(p ? MATY_REGION : MATX_REGION, 16'(j * 1024 + i), 32'(A[p][j][i]));
        end
      end
    $display("configuration loaded at cycle %0d", cyc);

    // cycle 1: feedback off, computed only
    n0 = n_fin;
    f0 = g_psc[0].m.frames_rx;
    fa_cycle(1, -1, -1, -1);
    wait_finish(n0);
    check_setpoints(4, "feedback off: setpoints");
    chk(g_psc[0].m.frames_rx == f0, "feedback off: nothing sent");
    c_fboff = 1;

    // cycle 2: feedback on, set-only requests (default mode 0x55), one BPM missing
    wr(REG_REGION, REG_CTRL, 1);
    n0 = n_fin;
    fa_cycle(2, 7, -1, -1);
    wait_finish(n0);
    check_setpoints(4, "set-only: setpoints");
    for (int i = 0; i < NP; i++) chk(model_sp[i] == setpoint[i], "set-only: power supply holds setpoint");
    chk(psc_link_ok == '1, "set-only: all links good");
    chk(latency < 3500, "set-only: latency within 3500 cycles");
    $display("set-only cycle latency %0d cycles", latency);
    $display("correction calculation %0d cycles", t_calc);
    chk(t_calc > 0 && t_calc < 392, "correction calculation within 392 clock edges");
    chk(t_calc <= 350, "algorithm processing within 3.5 us");
    c_missing = bpm_missing;
    n_sat = 0;
    for (int p = 0; p < 2; p++)
      for (int j = 0; j < NF; j++) begin
        logic [23:0] r;
        r = ref_sp(p, j, 4);
        if (r == 24'h7FFFFF || r == 24'h800000) n_sat++;
      end
    c_sat = n_sat;

    // cycle 3: set and read back (0x15), a stale BPM, a bad remote sample, a corrupted
    // answer on link 3 and link 9 disconnected
    wr(REG_REGION, REG_PSC_ID, 8'h15);
    g_psc[3].m.corrupt_next = 1'b1;
    cut[9] = 1'b1;
    n0 = n_fin;
    fa_cycle(3, -1, 20, 300);
    wait_finish(n0);
    check_setpoints(4, "read-back: setpoints");
    for (int i = 0; i < NP; i++)
      if (i != 9) chk(rb_current[i] == setpoint[i], "read-back: current readback");
    chk(psc_link_ok == ~(24'(1) << 3 | 24'(1) << 9), "read-back: links 3 and 9 flagged");
    // link 9 times out, which stretches this cycle; the budget is checked in cycle 4
    chk(latency > 999 + PSC_TO, "read-back: cycle waits for the timed-out link");
    $display("read-back cycle latency %0d cycles", latency);
    c_misaligned = bpm_misaligned;
    c_crc = psc_crc_err;
    c_timeout = psc_timeout;
    n_modes = 2;
    cut[9] = 1'b0;

    // cycle 4: a second trigger during the cycle
    n0 = n_fin;
    fork
      fa_cycle(4, -1, -1, -1);
      begin repeat (400) @(posedge clk); trig_in[1] <= 1'b1; repeat (5) @(posedge clk); trig_in[1] <= 1'b0; end
    join
    wait_finish(n0);
    check_setpoints(4, "overrun: setpoints");
    for (int i = 0; i < NP; i++) chk(rb_current[i] == setpoint[i], "read-back: current readback");
    chk(psc_link_ok == '1, "all links good again");
    // the readback port: status, current and setpoint of every supply, and an empty
    // answer beyond the last link
    for (int i = 0; i < NP; i++) begin
      rb_link = 5'(i);
      rb_kind = 3'd0;
      #1 chk(rb_data == 24'h000001, "readback port: status");
      rb_kind = 3'd1;
      #1 chk(rb_data == setpoint[i], "readback port: current");
      rb_kind = 3'd3;
      #1 chk(rb_data == setpoint[i], "readback port: setpoint");
    end
    rb_link = 5'd30;
    #1 chk(rb_data == '0, "readback port: no such link");
    chk(latency < 3500, "read-back: latency within 3500 cycles");
    $display("read-back cycle latency %0d cycles", latency);
    c_overrun = overrun_cnt;
    c_stall = ring_stall_cnt;
    c_drop = ring_drop_cnt;
    chk(ring_drop_cnt == 4 * NC * NBS, "own packets dropped after one trip");
    chk(bpm_ok_cnt == NB, "all BPMs present in the last cycle");
    chk(n_start == 4 && n_fin == 4, "four cycles started and finished");
    chk(n_daq == 4 * NB, "every sample passed to acquisition");

    // over-temperature: the station stops reacting to FA triggers
    for (int n = 0; n < 4; n++) begin
      @(posedge clk);
      temp_valid[1] <= 1'b1;
      temp[1] <= 12'd750;
      @(posedge clk);
      temp_valid[1] <= 1'b0;
    end
    repeat (2) @(posedge clk);
    chk(power_off, "over-temperature shutdown");
    c_temp = power_off;
    n0 = n_fin;
    n1 = n_start;
    @(posedge clk);
    trig_in[1] <= 1'b1;
    repeat (10) @(posedge clk);
    trig_in[1] <= 1'b0;
    repeat (5000) @(posedge clk);
    chk(n_start == n1, "no cycle started while switched off");
    chk(n_fin == n0, "no cycle while switched off");
    c_off = 1;

    $display("mechanisms: stall=%0d drop=%0d missing=%0d misaligned=%0d crc=%0d timeout=%0d sat=%0d overrun=%0d modes=%0d fb_off=%0d temp=%0d",
             c_stall, c_drop, c_missing, c_misaligned, c_crc, c_timeout, c_sat, c_overrun, n_modes, c_fboff, c_temp);
    chk(c_stall > 0, "ring stall happened");
    chk(c_drop > 0, "own drop happened");
    chk(c_missing == 1, "missing BPM happened");
    chk(c_misaligned == 1, "misaligned BPM happened");
    chk(c_crc == 1, "CRC error happened");
    chk(c_timeout == 1, "link timeout happened");
    chk(c_sat > 0, "saturation happened");
    chk(c_overrun == 1, "overrun happened");
    chk(c_temp == 1 && c_off == 1, "shutdown happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
