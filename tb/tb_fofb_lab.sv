// tb_fofb_lab: the laboratory set-up, one FOFB station at its default sizes with only
// 4 BPMs, 1 FOFB controller and 1 power supply connected.
// The station's ring output is fed back to its own ring input (a ring of one node), the
// first 4 BPM inputs of cell 0 report every FA cycle and the other 32 stay silent, and
// only power-supply link 0 has a controller; the other 23 links read an idle line.
// Per cycle the testbench checks the 24 setpoints against a matrix product over the
// 4 reporting BPMs, that the one controller received its setpoint, that the 8 silent
// BPMs of cell 0 are counted missing (cells 1 and 2 receive nothing, so their
// transceivers send nothing) and the 23 empty links time out, that cell 0's 12 packets
// are dropped after one trip, and that the cycle ends within the 4545-cycle FA period
// (100 MHz / 22 kHz). The empty links each cost the 2000-cycle link timeout, so the
// cycle must also take longer than BPM wait plus timeout.
module tb_fofb_lab;
  import fofb_pkg::*;
  localparam int NB = N_BPM_TOTAL, NC = 3, NBS = 12, NF = N_FC_PLANE, NP = 2 * NF;
  localparam int NLAB = 4, CPB = 4, PSC_TO = 2000, BPM_WAIT = 999, FA_PERIOD = 4545;

  logic clk = 0, rst_n = 0;
  logic [NC*NBS-1:0] bpm_valid;
  bpm_fa_t           bpm_data [NC*NBS];
  logic [IDX_W-1:0]  bpm_base [NC], xbpm_base [NC];
  logic              ring_in_valid, ring_out_valid;
  bpm_pkt_t          ring_in, ring_out;
  logic [NP-1:0]     psc_txd, psc_rxd, m_txd;
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

  fofb_unit dut (.*);

  psc_model #(.CLKS_PER_BIT(CPB)) m (.clk, .rxd(psc_txd[0]), .txd(m_txd[0]));
  assign m_txd[NP-1:1] = '1;
  assign psc_rxd = m_txd;

  // a ring of one station: what leaves comes back one cycle later
  always_ff @(posedge clk) begin
    ring_in_valid <= rst_n && ring_out_valid;
    ring_in       <= ring_out;
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_fin = 0, n_start = 0;
  logic signed [15:0] A [2][NF][NLAB];
  logic signed [31:0] ofs [2][NLAB];
  logic signed [31:0] pos [2][NLAB];

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
    if (rst_n && fofb_finish) n_fin++;
    if (rst_n && fofb_start) n_start++;
  end

  function automatic logic [23:0] ref_sp(input int p, input int j, input int trunc);
    longint acc;
    acc = 0;
    for (int i = 0; i < NLAB; i++)
      acc += longint'(A[p][j][i]) * (longint'(pos[p][i]) - longint'(ofs[p][i]));
    acc = acc >>> trunc;
    if (acc > 8388607) return 24'h7FFFFF;
    if (acc < -8388608) return 24'h800000;
    return 24'(acc);
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0, miss0, to0, drop0;
    bpm_valid = '0; trig_in = '0; cfg = '0; rb_link = '0; rb_kind = '0;
    temp_valid = '0; temp_limit = 12'd700; temp_clear = 0;
    for (int s = 0; s < 3; s++) temp[s] = 12'd400;
    for (int k = 0; k < NC * NBS; k++) bpm_data[k] = '0;
    for (int c = 0; c < NC; c++) begin
      bpm_base[c]  = 10'(c * NBS);
      xbpm_base[c] = 10'(NB + c);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(REG_REGION, REG_UNIT_ID, 0);
    wr(REG_REGION, REG_TRUNC, 2);
    wr(REG_REGION, REG_X_KP, 32'sd65536);
    wr(REG_REGION, REG_Y_KP, 32'sd65536);
    wr(REG_REGION, REG_CTRL, 1);
    for (int p = 0; p < 2; p++)
      for (int i = 0; i < NLAB; i++) begin
        ofs[p][i] = 32'($signed($urandom % 2001) - 1000);
        wr(p ? OFSY_REGION : OFSX_REGION, 16'(i), ofs[p][i]);
        for (int j = 0; j < NF; j++) begin
          A[p][j][i] = 16'($signed($urandom % 401) - 200);
          wr(p ? MATY_REGION : MATX_REGION, 16'(j * 1024 + i), 32'(A[p][j][i]));
        end
      end

    for (int c = 1; c <= 3; c++) begin
      int t0;
      for (int i = 0; i < NLAB; i++) begin
        pos[0][i] = 32'($signed($urandom % 20001) - 10000);
        pos[1][i] = 32'($signed($urandom % 20001) - 10000);
      end
      n0 = n_fin;
      miss0 = bpm_missing;
      to0 = psc_timeout;
      drop0 = ring_drop_cnt;
      @(posedge clk);
      trig_in[1] <= 1'b1;
      repeat (20) @(posedge clk);
      trig_in[1] <= 1'b0;
      for (int i = 0; i < NLAB; i++) begin
        @(posedge clk);
        bpm_valid <= '0;
        bpm_valid[i] <= 1'b1;
        bpm_data[i] <= '{seq: 16'(c), x: pos[0][i], y: pos[1][i]};
      end
      @(posedge clk);
      bpm_valid <= '0;
      t0 = 0;
      while (n_fin == n0) begin
        @(posedge clk);
        t0++;
        if (t0 > 20000) break;
      end
      @(posedge clk);
      for (int p = 0; p < 2; p++)
        for (int j = 0; j < NF; j++)
          chk(setpoint[p * NF + j] == ref_sp(p, j, 2), "setpoint from the 4 lab BPMs");
      chk(m.sp == setpoint[0], "the connected power supply received its setpoint");
      chk(psc_link_ok == NP'(1), "only link 0 answers");
      chk(bpm_ok_cnt == NLAB, "4 BPMs used");
      chk(16'(bpm_missing - miss0) == NBS - NLAB, "8 silent BPMs of cell 0 counted missing");
      chk(16'(psc_timeout - to0) == NP - 1, "23 empty links time out");
      chk(16'(ring_drop_cnt - drop0) == NBS, "cell 0's packets dropped after one trip");
      chk(latency > BPM_WAIT + PSC_TO && latency < FA_PERIOD, "cycle fits the FA period");
      $display("lab cycle %0d latency %0d cycles, setpoint[0] %h", c, latency, setpoint[0]);
    end
    chk(n_start == 3 && n_fin == 3, "three cycles");
    chk(overrun_cnt == 0, "no overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
