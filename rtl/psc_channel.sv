// psc_channel: request/response protocol with one fast power-supply controller (PSC).
//
// A request frame (ID, 24-bit data) is sent on `txd`; the controller answers on `rxd`
// with a fixed number of frames that depends on the request ID: first an echo of the
// request, then readbacks (0x93 status, 0x90 measured current, 0x95 command,
// 0x8A setpoint readback, 0x96 version, 0x8B configuration). The frame counts per ID
// and the response IDs follow the system description. The channel checks the echo,
// counts frames with a bad CRC or framing, stores every readback by its ID and gives up
// after TIMEOUT cycles without the full answer; these checks are this design's choices.
// Timing: `start` is taken when `busy` is low; `done` pulses once the last expected
// frame has arrived (or on timeout). `link_ok` holds the result of the last request.
module psc_channel
  import fofb_pkg::*;
#(
  parameter int CLKS_PER_BIT = 4,
  parameter int TIMEOUT      = 2000
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [7:0]      req_id,
  input  logic [SP_W-1:0] req_data,
  output logic            busy,
  output logic            done,
  output logic            txd,
  input  logic            rxd,
  output logic [SP_W-1:0] rb_status,
  output logic [SP_W-1:0] rb_current,
  output logic [SP_W-1:0] rb_command,
  output logic [SP_W-1:0] rb_spback,
  output logic [SP_W-1:0] rb_version,
  output logic [SP_W-1:0] rb_config,
  output logic            link_ok,
  output logic [15:0]     crc_err_cnt,
  output logic [15:0]     timeout_cnt
);
  typedef enum logic [1:0] {S_IDLE, S_TX, S_WAIT} state_t;
  state_t state;

  logic [7:0]      cur_id;
  logic [SP_W-1:0] cur_data;
  logic [2:0]      expect_n, got_n;
  logic            bad;
  logic [$clog2(TIMEOUT+1)-1:0] timer;

  logic            tx_start, tx_busy, tx_done;
  logic            rx_valid, rx_crc_ok, rx_frame_ok;
  logic [7:0]      rx_id;
  logic [SP_W-1:0] rx_data;

  assign tx_start = (state == S_IDLE) && start;

  psc_frame_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .start(tx_start), .id(req_id), .data(req_data),
    .busy(tx_busy), .done(tx_done), .txd
  );

  psc_frame_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd, .valid(rx_valid), .id(rx_id), .data(rx_data),
    .crc_ok(rx_crc_ok), .frame_ok(rx_frame_ok)
  );

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cur_id      <= '0;
      cur_data    <= '0;
      expect_n    <= '0;
      got_n       <= '0;
      bad         <= 1'b0;
      timer       <= '0;
      done        <= 1'b0;
      link_ok     <= 1'b0;
      crc_err_cnt <= '0;
      timeout_cnt <= '0;
      rb_status   <= '0;
      rb_current  <= '0;
      rb_command  <= '0;
      rb_spback   <= '0;
      rb_version  <= '0;
      rb_config   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          cur_id   <= req_id;
          cur_data <= req_data;
          expect_n <= psc_resp_frames(req_id);
          got_n    <= '0;
          bad      <= 1'b0;
          state    <= S_TX;
        end
        S_TX: if (tx_done) begin
          timer <= '0;
          state <= S_WAIT;
        end
        S_WAIT: begin
          timer <= timer + 1'b1;
          if (rx_valid) begin
            got_n <= got_n + 1'b1;
            if (!rx_crc_ok || !rx_frame_ok) begin
              crc_err_cnt <= crc_err_cnt + 1'b1;
              bad         <= 1'b1;
            end else if (got_n == 0) begin
              if (rx_id != cur_id || rx_data != cur_data) bad <= 1'b1;
            end else begin
              case (rx_id)
                RID_STATUS:  rb_status  <= rx_data;
                RID_CURRENT: rb_current <= rx_data;
                RID_COMMAND: rb_command <= rx_data;
                RID_SPBACK:  rb_spback  <= rx_data;
                RID_VERSION: rb_version <= rx_data;
                RID_CONFIG:  rb_config  <= rx_data;
                default:     bad        <= 1'b1;
              endcase
            end
            if (got_n + 1'b1 == expect_n) begin
              done    <= 1'b1;
              link_ok <= !bad && rx_crc_ok && rx_frame_ok &&
                         (got_n != 0 || (rx_id == cur_id && rx_data == cur_data));
              state   <= S_IDLE;
            end
          end else if (timer == ($clog2(TIMEOUT+1))'(TIMEOUT)) begin
            done        <= 1'b1;
            link_ok     <= 1'b0;
            timeout_cnt <= timeout_cnt + 1'b1;
            state       <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  // A request is only issued between transactions.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !tx_start);
`endif
endmodule
