// tb_foc: one FOFB controller in a small system of 4 stations with 12 BPMs each (three
// links of 4 BPMs) and 3 correctors per plane. The testbench loads random matrices and
// reference orbits, plays the BPM links and the rest of the ring (other stations'
// samples, and this station's own samples returned after a trip round the ring) and
// checks every setpoint against a model computed in the testbench: with KP = 1 and the
// bit position 0 the setpoint is the saturated matrix product. It also checks a missing
// BPM (its error counts as zero), the power-supply hand-over, feedback off, the latency
// report and a trigger that arrives during a running cycle.
module tb_foc;
  import fofb_pkg::*;
  localparam int NL = 3, NB = 48, NF = 3, UNIT = 1, BPL = 4;
  logic clk = 0, rst_n = 0, trig_fa = 0;
  cfg_wr_t cfg;
  logic [NL-1:0] bdt_valid;
  bpm_pkt_t bdt_pkt [NL];
  logic up_valid, dn_valid;
  bpm_pkt_t up_pkt, dn_pkt;
  logic psc_start, psc_done;
  logic [7:0] psc_id;
  logic [23:0] psc_cmd;
  logic [23:0] setpoint [2*NF];
  logic daq_valid;
  bpm_pkt_t daq_pkt;
  logic fofb_start, fofb_finish;
  logic [15:0] latency, bpm_ok_cnt, overrun_cnt, link_overflow_cnt, ring_stall_cnt;
  logic [15:0] ring_fwd_cnt, ring_inj_cnt, ring_drop_cnt;
  logic [2*NF-1:0] sp_sat;
  int checks = 0, failures = 0;

  foc #(.N_LINK(NL), .N_BPM(NB), .N_FC(NF), .FIFO_DEPTH(8)) dut (.*);

  always #5 clk = ~clk;

  logic signed [31:0] A [2][NF][NB];
  logic signed [31:0] ofs [2][NB];
  logic signed [31:0] pos [2][NB];
  bit okb [NB];
  bpm_pkt_t own_q [$];
  int n_psc = 0, cyc = 0, t_trig = 0, t_fin = 0;

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

  // power-supply interface: answer psc_start after 200 cycles
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (fofb_finish) t_fin <= cyc;
    if (psc_start && rst_n) begin
      n_psc++;
      fork begin repeat (200) @(posedge clk); psc_done <= 1'b1; @(posedge clk); psc_done <= 1'b0; end join_none
    end
    // the ring: this station's packets come back after a short trip
    if (dn_valid && dn_pkt.src == 4'(UNIT)) own_q.push_back(dn_pkt);
  end

  function automatic logic [23:0] ref_sp(input int p, input int j);
    longint acc, e;
    acc = 0;
    for (int i = 0; i < NB; i++) begin
      e = okb[i] ? longint'(pos[p][i]) - longint'(ofs[p][i]) : 0;
      e = longint'(32'(e));
      acc += longint'(A[p][j][i]) * e;
    end
    if (acc > 8388607) return 24'h7FFFFF;
    if (acc < -8388608) return 24'h800000;
    return 24'(acc);
  endfunction

  // one FA cycle: trigger, local links, ring traffic
  task automatic fa_cycle(input int missing);
    for (int i = 0; i < NB; i++) begin
      pos[0][i] = 32'($signed($urandom % 2001) - 1000);
      pos[1][i] = 32'($signed($urandom % 2001) - 1000);
      okb[i] = (i != missing);
    end
    @(posedge clk);
    trig_fa <= 1'b1;
    t_trig = cyc;
    @(posedge clk);
    trig_fa <= 1'b0;
    fork
      // local BDT bursts: link l carries BPMs UNIT*12 + l*4 ..
      for (int k = 0; k < BPL; k++) begin
        @(posedge clk);
        for (int l = 0; l < NL; l++) begin
          int ix;
          ix = UNIT * NL * BPL + l * BPL + k;
          bdt_valid[l] <= 1'b1;
          bdt_pkt[l] <= '{src: 4'h0, idx: 10'(ix), ok: okb[ix], x: pos[0][ix], y: pos[1][ix]};
        end
        if (k == BPL - 1) begin
          @(posedge clk);
          bdt_valid <= '0;
        end
      end
      // upstream: other stations' samples, own samples returned
      begin
        int i;
        i = 0;
        while (i < NB || own_q.size() != 0) begin
          @(posedge clk);
          up_valid <= 1'b0;
          if (own_q.size() != 0 && $urandom % 2 == 0) begin
            up_valid <= 1'b1;
            up_pkt   <= own_q.pop_front();
          end else if (i < NB) begin
            if (i / (NL * BPL) == UNIT) i = i + NL * BPL;
            if (i < NB) begin
              up_valid <= 1'b1;
              up_pkt   <= '{src: 4'((i / (NL * BPL))), idx: 10'(i), ok: okb[i], x: pos[0][i], y: pos[1][i]};
              i++;
            end
          end
        end
        @(posedge clk);
        up_valid <= 1'b0;
      end
    join
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fin0;
    cfg = '0; bdt_valid = '0; up_valid = 0; up_pkt = '0; psc_done = 0;
    for (int l = 0; l < NL; l++) bdt_pkt[l] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(REG_REGION, REG_UNIT_ID, UNIT);
    wr(REG_REGION, REG_BPM_WAIT, 150);
    wr(REG_REGION, REG_TRUNC, 0);
    wr(REG_REGION, REG_X_KP, 32'sd65536);
    wr(REG_REGION, REG_Y_KP, 32'sd65536);
    wr(REG_REGION, REG_PSC_ID, 8'h15);
    for (int p = 0; p < 2; p++)
      for (int i = 0; i < NB; i++) begin
        ofs[p][i] = 32'($signed($urandom % 201) - 100);
        wr(p ? OFSY_REGION : OFSX_REGION, 16'(i), ofs[p][i]);
        for (int j = 0; j < NF; j++) begin
          A[p][j][i] = 32'($signed($urandom % 401) - 200);
          if (p == 0 && j == 2) A[p][j][i] = 32'sd5000;   // this one saturates
          wr(p ? MATY_REGION : MATX_REGION, 16'(j * 1024 + i), A[p][j][i]);
        end
      end
    // feedback off: setpoints computed, nothing sent
    fin0 = t_fin;
    fa_cycle(-1);
    wait (t_fin != fin0);
    @(posedge clk);
    chk(n_psc == 0, "feedback off: no power-supply request");
    for (int p = 0; p < 2; p++)
      for (int j = 0; j < NF; j++)
        chk(setpoint[p * NF + j] == ref_sp(p, j), "setpoint, feedback off");
    chk(bpm_ok_cnt == NB, "all BPMs present");
    wr(REG_REGION, REG_CTRL, 1);
    // feedback on, BPM 20 missing
    fin0 = t_fin;
    fa_cycle(20);
    wait (t_fin != fin0);
    @(posedge clk);
    chk(n_psc == 1, "feedback on: one power-supply request");
    chk(psc_id == 8'h15, "request ID from register");
    for (int p = 0; p < 2; p++)
      for (int j = 0; j < NF; j++)
        chk(setpoint[p * NF + j] == ref_sp(p, j), "setpoint, one BPM missing");
    chk(bpm_ok_cnt == NB - 1, "missing BPM not counted");
    chk(sp_sat[2] == 1'b1, "saturated channel flagged");
    // latency: wait + feed (two BPMs per cycle) + array + PID + power supply
    // t_trig is the edge before the one that takes the trigger; t_fin the edge after
    // the one that raises fofb_finish
    chk(latency == 16'(t_fin - t_trig - 2), "latency report");
    chk(latency > 150 + NB / 2 + 200 && latency < 150 + NB / 2 + 200 + 60, "latency range (feed of two BPMs per cycle)");
    chk(ring_drop_cnt == 2 * NL * BPL && ring_inj_cnt == 2 * NL * BPL, "own packets injected and dropped");
    chk(ring_fwd_cnt == 2 * (NB - NL * BPL), "other packets forwarded");
    chk(ring_stall_cnt > 0, "local links stalled by ring traffic");
    chk(link_overflow_cnt == 0, "no link overflow");
    // a trigger in the middle of a cycle is counted, not started
    fin0 = t_fin;
    fork
      fa_cycle(-1);
      begin repeat (100) @(posedge clk); trig_fa <= 1'b1; @(posedge clk); trig_fa <= 1'b0; end
    join
    wait (t_fin != fin0);
    @(posedge clk);
    chk(overrun_cnt == 1, "overrun counted");
    for (int p = 0; p < 2; p++)
      for (int j = 0; j < NF; j++)
        chk(setpoint[p * NF + j] == ref_sp(p, j), "setpoint after overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
