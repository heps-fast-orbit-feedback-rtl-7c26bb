// tb_fofb_ring_node: four nodes closed into a ring, each with two local links that offer
// bursts of packets at random times. Checks that every node stores every packet of the
// ring exactly once with its data intact, that each packet is dropped only by the node
// that injected it, that the ring empties, and that local links were stalled while the
// ring was busy.
module tb_fofb_ring_node;
  import fofb_pkg::*;
  localparam int NN = 4, NL = 2, PER = 10;   // PER packets per local link
  logic clk = 0, rst_n = 0;
  logic [NN-1:0] v;
  bpm_pkt_t      p [NN];
  logic [NL-1:0] lv [NN], lr [NN];
  bpm_pkt_t      lp [NN][NL];
  logic          sv [NN];
  bpm_pkt_t      sp [NN];
  logic [15:0]   fwd [NN], inj [NN], drp [NN], stl [NN];
  int checks = 0, failures = 0;
  int seen [NN][1024];
  int sent [NN][NL];

  for (genvar n = 0; n < NN; n++) begin : g_n
    fofb_ring_node #(.N_LOCAL(NL)) node (
      .clk, .rst_n, .unit_id(UNIT_W'(n + 3)),
      .up_valid(v[(n + NN - 1) % NN]), .up_pkt(p[(n + NN - 1) % NN]),
      .dn_valid(v[n]), .dn_pkt(p[n]),
      .loc_valid(lv[n]), .loc_pkt(lp[n]), .loc_ready(lr[n]),
      .st_valid(sv[n]), .st_pkt(sp[n]),
      .fwd_cnt(fwd[n]), .inj_cnt(inj[n]), .drop_cnt(drp[n]), .stall_cnt(stl[n])
    );
  end

  always #5 clk = ~clk;

  function automatic int gidx(input int n, input int l, input int k);
    return n * NL * PER + l * PER + k;
  endfunction

  // local sources: present packets in order, wait a random time between bursts
  always @(posedge clk) begin
    if (rst_n) begin
      for (int n = 0; n < NN; n++) begin
        for (int l = 0; l < NL; l++) begin
          if (lv[n][l] && lr[n][l]) sent[n][l]++;
          if (sent[n][l] < PER && ($urandom % 2 == 0 || (lv[n][l] && !lr[n][l]))) begin
            int k;
            k = sent[n][l];
            lv[n][l] <= 1'b1;
            lp[n][l] <= '{src: 4'hF, idx: 10'(gidx(n, l, k)), ok: 1'b1,
                          x: 32'(gidx(n, l, k) * 3), y: 32'(-gidx(n, l, k))};
          end else begin
            lv[n][l] <= 1'b0;
          end
        end
      end
      for (int n = 0; n < NN; n++) if (sv[n]) begin
        seen[n][sp[n].idx]++;
        if (sp[n].x != 32'(int'(sp[n].idx) * 3) || sp[n].y != 32'(-int'(sp[n].idx))) begin
          failures++;
          $display("FAIL data corrupted at node %0d idx %0d", n, sp[n].idx);
        end
      end
    end
  end

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tot_stall;
    for (int n = 0; n < NN; n++) begin
      lv[n] = '0;
      for (int l = 0; l < NL; l++) begin
        lp[n][l] = '0;
        sent[n][l] = 0;
      end
      for (int i = 0; i < 1024; i++) seen[n][i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (400) @(posedge clk);
    for (int n = 0; n < NN; n++) begin
      for (int i = 0; i < NN * NL * PER; i++) begin
        checks++;
        if (seen[n][i] != 1) begin
          failures++;
          $display("FAIL node %0d saw idx %0d %0d times", n, i, seen[n][i]);
        end
      end
      checks++;
      if (inj[n] != NL * PER || drp[n] != NL * PER || fwd[n] != (NN - 1) * NL * PER) begin
        failures++;
        $display("FAIL node %0d counters inj=%0d drop=%0d fwd=%0d", n, inj[n], drp[n], fwd[n]);
      end
    end
    checks++;
    if (v != '0) failures++;
    tot_stall = 0;
    for (int n = 0; n < NN; n++) tot_stall += stl[n];
    $display("local stalls: %0d", tot_stall);
    checks++;
    if (tot_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
