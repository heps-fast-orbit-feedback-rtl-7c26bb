// fofb_ring_node: one station's node on the FOFB ring.
//
// The 16 FOFB controllers are linked in a one-way ring so that each of them obtains all
// 576 BPM samples. Each cycle the node takes at most one packet from its upstream
// neighbour. A packet injected by another station is forwarded downstream and also
// handed to the local orbit store; a packet that has come back to the station that
// injected it has been seen by every station and is dropped. Local packets (from the
// station's own BPM links) are stamped with the station number and injected whenever
// the downstream slot is free: the upstream link idle or carrying a returning packet.
// Local links are served round robin and are stalled while the ring is busy. The ring
// and its purpose follow the system description; the one-way direction, the source tag
// and the priority rule are this design's choices. Ring output and store output are
// registered: one cycle from input to output.
module fofb_ring_node
  import fofb_pkg::*;
#(
  parameter int N_LOCAL = N_CELLS_UNIT
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [UNIT_W-1:0]  unit_id,
  input  logic               up_valid,
  input  bpm_pkt_t           up_pkt,
  output logic               dn_valid,
  output bpm_pkt_t           dn_pkt,
  input  logic [N_LOCAL-1:0] loc_valid,
  input  bpm_pkt_t           loc_pkt [N_LOCAL],
  output logic [N_LOCAL-1:0] loc_ready,
  output logic               st_valid,
  output bpm_pkt_t           st_pkt,
  output logic [15:0]        fwd_cnt,
  output logic [15:0]        inj_cnt,
  output logic [15:0]        drop_cnt,
  output logic [15:0]        stall_cnt
);
  localparam int LW = (N_LOCAL > 1) ? $clog2(N_LOCAL) : 1;

  logic          up_own, slot_free, any_loc;
  logic [LW-1:0] rr, grant;
  bpm_pkt_t      inj_pkt;

  assign up_own    = up_valid && (up_pkt.src == unit_id);
  assign slot_free = !up_valid || up_own;
  assign any_loc   = |loc_valid;

  // round-robin choice starting after the last granted link
  always_comb begin
    grant = rr;
    for (int n = N_LOCAL; n >= 1; n--) begin
      int c;
      c = (int'(rr) + n) % N_LOCAL;
      if (loc_valid[c]) grant = LW'(c);
    end
    loc_ready = '0;
    if (slot_free && any_loc) loc_ready[grant] = 1'b1;
    inj_pkt     = loc_pkt[grant];
    inj_pkt.src = unit_id;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dn_valid  <= 1'b0;
      dn_pkt    <= '0;
      st_valid  <= 1'b0;
      st_pkt    <= '0;
      rr        <= '0;
      fwd_cnt   <= '0;
      inj_cnt   <= '0;
      drop_cnt  <= '0;
      stall_cnt <= '0;
    end else begin
      dn_valid <= 1'b0;
      st_valid <= 1'b0;
      if (up_valid && !up_own) begin
        dn_valid <= 1'b1;
        dn_pkt   <= up_pkt;
        st_valid <= 1'b1;
        st_pkt   <= up_pkt;
        fwd_cnt  <= fwd_cnt + 1'b1;
        if (any_loc) stall_cnt <= stall_cnt + 1'b1;
      end else if (any_loc) begin
        dn_valid <= 1'b1;
        dn_pkt   <= inj_pkt;
        st_valid <= 1'b1;
        st_pkt   <= inj_pkt;
        rr       <= grant;
        inj_cnt  <= inj_cnt + 1'b1;
      end
      if (up_own) drop_cnt <= drop_cnt + 1'b1;
    end
  end
endmodule
