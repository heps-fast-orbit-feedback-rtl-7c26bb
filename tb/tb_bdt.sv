// tb_bdt: 12 BPMs and 2 X-ray BPMs into one transceiver. Checks a complete cycle sent
// in index order under random back-pressure, a cycle with one BPM missing (sent after
// the timeout, that BPM marked not ok, the others intact) and a cycle with one BPM from
// another FA cycle (marked not ok, counted as misaligned).
module tb_bdt;
  import fofb_pkg::*;
  localparam int NB = 12, NX = 2, NIN = NB + NX, TO = 50;
  logic clk = 0, rst_n = 0;
  logic [IDX_W-1:0] base_idx = 10'd36, xbpm_idx = 10'd600;
  logic [NIN-1:0] in_valid;
  bpm_fa_t in_data [NIN];
  logic out_valid, out_ready;
  bpm_pkt_t out_pkt;
  logic [15:0] missing_cnt, misaligned_cnt, burst_cnt;
  int checks = 0, failures = 0;
  int cyc = 0;

  bdt #(.N_BPM(NB), .N_XBPM(NX), .TIMEOUT(TO)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic signed [31:0] xv(input int k, input int s);
    return 32'(k * 1000 + s * 7 - 5000);
  endfunction

  // deliver one FA cycle; `skip` BPM not sent, `late` BPM sent with the previous seq
  task automatic deliver(input int s, input int skip, input int late);
    logic [NIN-1:0] todo;
    todo = '1;
    if (skip >= 0) todo[skip] = 1'b0;
    while (todo != '0) begin
      @(posedge clk);
      in_valid <= '0;
      for (int k = 0; k < NIN; k++) begin
        if (todo[k] && ($urandom % 3 == 0)) begin
          in_valid[k] <= 1'b1;
          in_data[k] <= '{seq: 16'((k == late) ? s - 1 : s), x: xv(k, s), y: -xv(k, s)};
          todo[k] = 1'b0;
        end
      end
    end
    @(posedge clk);
    in_valid <= '0;
  endtask

  task automatic collect(input int s, input int skip, input int late, output int t_first);
    int n;
    n = 0;
    t_first = -1;
    while (n < NIN) begin
      @(posedge clk);
      if (out_valid && out_ready) begin
        logic [9:0] ei;
        ei = (n < NB) ? 10'(36 + n) : 10'(600 + n - NB);
        if (t_first < 0) t_first = cyc;
        chk(out_pkt.idx == ei, "index order");
        chk(out_pkt.ok == (n != skip && n != late), "ok flag");
        if (n != skip) chk(out_pkt.x == xv(n, s) && out_pkt.y == -xv(n, s), "data");
        n++;
      end
    end
  endtask

  always @(posedge clk) out_ready <= ($urandom % 4 != 0);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, tf;
    in_valid = '0;
    for (int k = 0; k < NIN; k++) in_data[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    fork deliver(5, -1, -1); collect(5, -1, -1, tf); join
    @(posedge clk);
    chk(missing_cnt == 0 && misaligned_cnt == 0 && burst_cnt == 1, "clean cycle counters");
    repeat (5) @(posedge clk);
    t0 = cyc;
    fork deliver(6, 3, -1); collect(6, 3, -1, tf); join
    @(posedge clk);
    chk(missing_cnt == 1, "missing BPM counted");
    chk(tf - t0 >= TO, "missing BPM: sent after timeout");
    repeat (5) @(posedge clk);
    t0 = cyc;
    fork deliver(7, -1, 8); collect(7, -1, 8, tf); join
    @(posedge clk);
    chk(misaligned_cnt == 1 && missing_cnt == 1, "misaligned BPM counted");
    chk(tf - t0 < TO, "complete cycle: sent without waiting for the timeout");
    chk(burst_cnt == 3, "three bursts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
