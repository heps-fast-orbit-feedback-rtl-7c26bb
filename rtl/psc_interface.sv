// psc_interface: the PSC interface board of one FOFB station.
//
// It drives N_PSC fast power-supply controllers over point-to-point serial links, one
// psc_channel each. On `start` every channel sends the same request ID; setpoint
// requests carry the channel's own setpoint, command requests (0x0A, 0x4A) the common
// command word. `done` pulses once every channel has finished; the readbacks of each
// controller and a per-link status (the board's status display) are kept for the FOFB
// controller. Its role, 24 controllers per station and the readback set follow the
// system description; broadcasting one ID to all channels is this design's choice.
module psc_interface
  import fofb_pkg::*;
#(
  parameter int N           = N_PSC,
  parameter int CLKS_PER_BIT = 4,
  parameter int TIMEOUT      = 2000
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [7:0]      req_id,
  input  logic [SP_W-1:0] cmd_data,
  input  logic [SP_W-1:0] setpoint   [N],
  output logic            busy,
  output logic            done,
  output logic [N-1:0]    txd,
  input  logic [N-1:0]    rxd,
  output logic [SP_W-1:0] rb_status  [N],
  output logic [SP_W-1:0] rb_current [N],
  output logic [SP_W-1:0] rb_spback  [N],
  output logic [SP_W-1:0] rb_command [N],
  output logic [SP_W-1:0] rb_version [N],
  output logic [SP_W-1:0] rb_config  [N],
  output logic [N-1:0]    link_ok,
  output logic [15:0]     crc_err_total,
  output logic [15:0]     timeout_total
);
  logic [N-1:0] ch_busy;
  logic         running;
  logic         is_cmd;
  logic [15:0]  crc_cnt [N];
  logic [15:0]  to_cnt  [N];

  assign is_cmd = (req_id == ID_SET_CMD_READ) || (req_id == ID_SET_CMD);

  for (genvar i = 0; i < N; i++) begin : g_ch
    logic            ch_done;
    psc_channel #(.CLKS_PER_BIT(CLKS_PER_BIT), .TIMEOUT(TIMEOUT)) u_ch (
      .clk, .rst_n,
      .start      (start && !running),
      .req_id,
      .req_data   (is_cmd ? cmd_data : setpoint[i]),
      .busy       (ch_busy[i]),
      .done       (ch_done),
      .txd        (txd[i]),
      .rxd        (rxd[i]),
      .rb_status  (rb_status[i]),
      .rb_current (rb_current[i]),
      .rb_command (rb_command[i]),
      .rb_spback  (rb_spback[i]),
      .rb_version (rb_version[i]),
      .rb_config  (rb_config[i]),
      .link_ok    (link_ok[i]),
      .crc_err_cnt(crc_cnt[i]),
      .timeout_cnt(to_cnt[i])
    );
  end

  always_comb begin
    crc_err_total = '0;
    timeout_total = '0;
    for (int i = 0; i < N; i++) begin
      crc_err_total = crc_err_total + crc_cnt[i];
      timeout_total = timeout_total + to_cnt[i];
    end
  end

  // `running` covers the cycle between `start` and the channels raising `busy`.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !running) running <= 1'b1;
      else if (running && ch_busy == '0) begin
        running <= 1'b0;
        done    <= 1'b1;
      end
    end
  end

  assign busy = running;
endmodule
