// bdt: BPM data transceiver of one BPM station.
//
// Every BPM of the station (and every X-ray BPM nearby) sends its fast-acquisition (FA)
// sample point to point, tagged with an FA sequence number. The transceiver stores the
// samples, checks that they belong to the newest FA cycle among those received, and
// once all have arrived, or TIMEOUT cycles after the first, sends them one after another
// on a single output link, each marked `ok` if it arrived and is aligned. A missing or
// late BPM therefore never blocks the data of the others. Its role (receive the 12 BPMs
// and the XBPMs, check, reassemble, align, send on one link) follows the system
// description; sequence-number alignment, the timeout and the packet layout are this
// design's choices. Samples arriving while a burst is being sent are ignored.
// Output: a valid/ready stream of N_BPM+N_XBPM packets per FA cycle, BPMs first with
// global indices base_idx.., then X-ray BPMs with indices xbpm_idx...
module bdt
  import fofb_pkg::*;
#(
  parameter int N_BPM   = N_BPM_STATION,
  parameter int N_XBPM  = 0,
  parameter int TIMEOUT = 500
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [IDX_W-1:0]       base_idx,
  input  logic [IDX_W-1:0]       xbpm_idx,
  input  logic [N_BPM+N_XBPM-1:0] in_valid,
  input  bpm_fa_t                in_data [N_BPM+N_XBPM],
  output logic                   out_valid,
  output bpm_pkt_t               out_pkt,
  input  logic                   out_ready,
  output logic [15:0]            missing_cnt,
  output logic [15:0]            misaligned_cnt,
  output logic [15:0]            burst_cnt
);
  localparam int NIN = N_BPM + N_XBPM;
  localparam int KW  = $clog2(NIN + 1);

  typedef enum logic {S_COLLECT, S_SEND} state_t;
  state_t state;

  bpm_fa_t          buf_q [NIN];
  logic [NIN-1:0]   arrived;
  logic [SEQ_W-1:0] seq_ref;
  logic [KW-1:0]    k;
  logic [$clog2(TIMEOUT+1)-1:0] timer;
  logic             aligned_k;
  logic [SEQ_W-1:0] seq_next;

  // reference FA cycle: the newest sequence number seen (modulo 2^SEQ_W), so a stale
  // sample cannot pull the others out of alignment
  always_comb begin
    logic have;
    seq_next = seq_ref;
    have     = (arrived != '0);
    for (int i = 0; i < NIN; i++) begin
      if (in_valid[i]) begin
        if (!have || $signed(in_data[i].seq - seq_next) > 0) seq_next = in_data[i].seq;
        have = 1'b1;
      end
    end
  end

  assign aligned_k = arrived[k] && (buf_q[k].seq == seq_ref);

  always_comb begin
    out_pkt     = '0;
    out_pkt.idx = (k < KW'(N_BPM)) ? base_idx + IDX_W'(k) : xbpm_idx + IDX_W'(k) - IDX_W'(N_BPM);
    out_pkt.ok  = aligned_k;
    out_pkt.x   = buf_q[k].x;
    out_pkt.y   = buf_q[k].y;
  end
  assign out_valid = (state == S_SEND);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_COLLECT;
      arrived        <= '0;
      seq_ref        <= '0;
      k              <= '0;
      timer          <= '0;
      missing_cnt    <= '0;
      misaligned_cnt <= '0;
      burst_cnt      <= '0;
      for (int i = 0; i < NIN; i++) buf_q[i] <= '0;
    end else begin
      unique case (state)
        S_COLLECT: begin
          for (int i = 0; i < NIN; i++) begin
            if (in_valid[i]) begin
              buf_q[i]   <= in_data[i];
              arrived[i] <= 1'b1;
            end
          end
          seq_ref <= seq_next;
          // the first sample of a cycle starts the timeout
          if (arrived == '0) begin
            timer <= '0;
          end else begin
            timer <= timer + 1'b1;
            if (arrived == '1 || timer == ($clog2(TIMEOUT+1))'(TIMEOUT)) begin
              state <= S_SEND;
              k     <= '0;
            end
          end
        end
        S_SEND: if (out_ready) begin
          if (!arrived[k]) missing_cnt <= missing_cnt + 1'b1;
          else if (!aligned_k) misaligned_cnt <= misaligned_cnt + 1'b1;
          if (k == KW'(NIN - 1)) begin
            state     <= S_COLLECT;
            arrived   <= '0;
            burst_cnt <= burst_cnt + 1'b1;
          end else begin
            k <= k + 1'b1;
          end
        end
        default: state <= S_COLLECT;
      endcase
    end
  end
endmodule
