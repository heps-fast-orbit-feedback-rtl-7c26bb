// aux: auxiliary board logic of one FOFB station: triggers and temperature protection.
//
// Triggers: the timing-system triggers (291 Hz, FA, Sync, DAQ) arrive asynchronously;
// each is synchronised with two flip-flops and its rising edge becomes a one-cycle pulse
// for the FOFB controller, three cycles after the edge. Each trigger is counted.
// Temperatures: the boards of the station report temperatures (`temp_valid` strobes a
// new reading). A reading above `temp_limit` on DEBOUNCE consecutive readings of one
// sensor raises `power_off`, which stays set until `clear`, and the hottest reading of
// each sensor is kept. Forwarding triggers and switching the station off on
// over-temperature follow the system description; the synchroniser, the debounce count
// and the latched shutdown are this design's choices.
module aux #(
  parameter int N_TRIG   = 4,
  parameter int N_TEMP   = 3,
  parameter int TEMP_W   = 12,
  parameter int DEBOUNCE = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_TRIG-1:0] trig_in,
  output logic [N_TRIG-1:0] trig_out,
  output logic [15:0]       trig_cnt [N_TRIG],
  input  logic [N_TEMP-1:0] temp_valid,
  input  logic [TEMP_W-1:0] temp [N_TEMP],
  input  logic [TEMP_W-1:0] temp_limit,
  input  logic              clear,
  output logic [N_TEMP-1:0] over_temp,
  output logic [TEMP_W-1:0] temp_max [N_TEMP],
  output logic              power_off
);
  localparam int DW = $clog2(DEBOUNCE + 1);

  logic [N_TRIG-1:0] s1, s2, s3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1       <= '0;
      s2       <= '0;
      s3       <= '0;
      trig_out <= '0;
      for (int t = 0; t < N_TRIG; t++) trig_cnt[t] <= '0;
    end else begin
      s1       <= trig_in;
      s2       <= s1;
      s3       <= s2;
      trig_out <= s2 & ~s3;
      for (int t = 0; t < N_TRIG; t++) if (s2[t] && !s3[t]) trig_cnt[t] <= trig_cnt[t] + 1'b1;
    end
  end

  logic [DW-1:0] over_n [N_TEMP];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      power_off <= 1'b0;
      over_temp <= '0;
      for (int s = 0; s < N_TEMP; s++) begin
        over_n[s]   <= '0;
        temp_max[s] <= '0;
      end
    end else begin
      if (clear) begin
        power_off <= 1'b0;
        over_temp <= '0;
        for (int s = 0; s < N_TEMP; s++) over_n[s] <= '0;
      end
      for (int s = 0; s < N_TEMP; s++) begin
        if (temp_valid[s]) begin
          if (temp[s] > temp_max[s]) temp_max[s] <= temp[s];
          if (temp[s] > temp_limit) begin
            if (over_n[s] == DW'(DEBOUNCE - 1)) begin
              over_temp[s] <= 1'b1;
              power_off    <= 1'b1;
            end
            if (over_n[s] != DW'(DEBOUNCE)) over_n[s] <= over_n[s] + 1'b1;
          end else begin
            over_n[s] <= '0;
          end
        end
      end
    end
  end
endmodule
