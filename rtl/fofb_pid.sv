// fofb_pid: PID controllers of the station's fast correctors, time multiplexed.
//
// For each corrector channel the input is the correction from the matrix product (the
// error in corrector space). The controller keeps an integral and the previous input and
// computes u = (KP*e + KI*sum(e) + KD*(e - e_prev)) >> GAIN_FRAC with signed gains of
// GAIN_FRAC fractional bits, separate for the horizontal channels (the first N_CH/2) and
// the vertical ones. The setpoint is the 24-bit field of u that starts at bit `trunc`,
// saturated to the 24-bit two's-complement range (sign, 4 integer, 19 fraction bits,
// +-16 A). PID gains per plane and the selectable bit position follow the system
// description; the PID form, the gain format and saturation are this design's choices.
// Timing: on `start` the channels are processed one per cycle; `done` pulses in the
// cycle after the last, N_CH+1 cycles after `start`. `clear_int` resets the integrals
// and previous inputs (feedback off).
module fofb_pid
  import fofb_pkg::*;
#(
  parameter int N_CH      = N_PSC,
  parameter int IN_W      = 64,
  parameter int GAIN_W    = 32,
  parameter int GAIN_FRAC = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     clear_int,
  input  logic signed [IN_W-1:0]   err [N_CH],
  input  logic signed [GAIN_W-1:0] kp_x,
  input  logic signed [GAIN_W-1:0] ki_x,
  input  logic signed [GAIN_W-1:0] kd_x,
  input  logic signed [GAIN_W-1:0] kp_y,
  input  logic signed [GAIN_W-1:0] ki_y,
  input  logic signed [GAIN_W-1:0] kd_y,
  input  logic [5:0]               trunc,
  output logic [SP_W-1:0]          setpoint [N_CH],
  output logic [N_CH-1:0]          sat,
  output logic                     done
);
  localparam int CW = $clog2(N_CH + 1);
  localparam int PW = IN_W + GAIN_W + 2;

  logic signed [IN_W-1:0]   integ [N_CH];
  logic signed [IN_W-1:0]   eprev [N_CH];
  logic                     busy;
  logic [CW-1:0]            ch;

  logic signed [IN_W-1:0]   e, i_new, d;
  logic signed [GAIN_W-1:0] kp, ki, kd;
  logic signed [PW-1:0]     u, v;
  logic                     sat_c;
  logic [SP_W-1:0]          sp_c;

  localparam logic signed [IN_W-1:0] IMAX = {1'b0, {(IN_W-1){1'b1}}};
  localparam logic signed [IN_W-1:0] IMIN = {1'b1, {(IN_W-1){1'b0}}};

  always_comb begin
    logic signed [IN_W:0] isum;
    e    = err[ch];
    isum = {integ[ch][IN_W-1], integ[ch]} + {e[IN_W-1], e};
    // saturate the integral instead of letting it wrap
    if (isum > (IN_W+1)'(IMAX))      i_new = IMAX;
    else if (isum < (IN_W+1)'(IMIN)) i_new = IMIN;
    else                             i_new = isum[IN_W-1:0];
    d  = e - eprev[ch];
    kp = (ch < CW'(N_CH / 2)) ? kp_x : kp_y;
    ki = (ch < CW'(N_CH / 2)) ? ki_x : ki_y;
    kd = (ch < CW'(N_CH / 2)) ? kd_x : kd_y;
    u  = (PW'(kp) * PW'(e) + PW'(ki) * PW'(i_new) + PW'(kd) * PW'(d)) >>> GAIN_FRAC;
    v  = u >>> trunc;
    if (v > PW'(2 ** (SP_W - 1) - 1)) begin
      sp_c  = {1'b0, {(SP_W-1){1'b1}}};
      sat_c = 1'b1;
    end else if (v < -PW'(2 ** (SP_W - 1))) begin
      sp_c  = {1'b1, {(SP_W-1){1'b0}}};
      sat_c = 1'b1;
    end else begin
      sp_c  = v[SP_W-1:0];
      sat_c = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      ch   <= '0;
      done <= 1'b0;
      sat  <= '0;
      for (int i = 0; i < N_CH; i++) begin
        integ[i]    <= '0;
        eprev[i]    <= '0;
        setpoint[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (clear_int) begin
        for (int i = 0; i < N_CH; i++) begin
          integ[i] <= '0;
          eprev[i] <= '0;
        end
      end
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          ch   <= '0;
        end
      end else begin
        integ[ch]    <= i_new;
        eprev[ch]    <= e;
        setpoint[ch] <= sp_c;
        sat[ch]      <= sat_c;
        if (ch == CW'(N_CH - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          ch <= ch + 1'b1;
        end
      end
    end
  end
endmodule
