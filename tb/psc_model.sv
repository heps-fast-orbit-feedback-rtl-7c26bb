// psc_model: behavioural model of a fast power-supply controller (PSC) link end, for
// testbenches only. It decodes request frames bit by bit, keeps a setpoint and a command
// word, and after the response delay of the protocol table answers with the echo and the
// readback frames for the request ID (4.3 us = 430 cycles for the read-all requests,
// 2.6 us = 260 cycles for the short reads, none for set-only requests). Its CRC is
// computed by polynomial long division, independently of the RTL. Setting `corrupt_next`
// flips one CRC bit of the next frame it sends.
module psc_model
  import fofb_pkg::*;
#(
  parameter int          CLKS_PER_BIT = 4,
  parameter int          DELAY_LONG   = 430,
  parameter int          DELAY_SHORT  = 260,
  parameter logic [23:0] VERSION      = 24'h000123
) (
  input  logic clk,
  input  logic rxd,
  output logic txd
);
  logic [23:0] sp, cmd;
  logic        corrupt_next;
  int          frames_rx, bad_rx;
  logic [7:0]  last_id;
  logic [23:0] last_data;

  function automatic logic [7:0] crc_ref(input logic [31:0] m);
    logic [39:0] r;
    r = {m, 8'h00};
    for (int i = 39; i >= 8; i--) if (r[i]) r[i-:9] = r[i-:9] ^ 9'h1B3;
    return r[7:0];
  endfunction

  task automatic send_frame(input logic [7:0] id, input logic [23:0] d);
    logic [42:0] f;
    f = {1'b0, id, d, crc_ref({id, d}), 2'b11};
    if (corrupt_next) begin
      f[2] = ~f[2];
      corrupt_next = 1'b0;
    end
    for (int k = 42; k >= 0; k--) begin
      txd = f[k];
      repeat (CLKS_PER_BIT) @(posedge clk);
    end
    txd = 1'b1;
    repeat (2 * CLKS_PER_BIT) @(posedge clk);
  endtask

  initial begin
    logic [42:0] f;
    sp = '0; cmd = '0; corrupt_next = 1'b0; frames_rx = 0; bad_rx = 0;
    last_id = '0; last_data = '0;
    txd = 1'b1;
    forever begin
      @(posedge clk iff rxd == 1'b0);
      repeat (CLKS_PER_BIT / 2) @(posedge clk);
      f[42] = rxd;
      for (int k = 41; k >= 0; k--) begin
        repeat (CLKS_PER_BIT) @(posedge clk);
        f[k] = rxd;
      end
      frames_rx++;
      last_id = f[41:34];
      last_data = f[33:10];
      if (f[42] != 1'b0 || f[1:0] != 2'b11 || crc_ref(f[41:10]) != f[9:2]) begin
        bad_rx++;
        continue;
      end
      repeat (CLKS_PER_BIT) @(posedge clk);
      case (last_id)
        8'h15, 8'h0A, 8'h40: begin
          if (last_id == 8'h15) sp = last_data;
          if (last_id == 8'h0A) cmd = last_data;
          send_frame(last_id, last_data);
          repeat (DELAY_LONG) @(posedge clk);
          send_frame(8'h93, 24'h000001);
          send_frame(8'h90, sp);
          send_frame(8'h95, cmd);
          send_frame(8'h8A, sp);
        end
        8'h00: begin
          send_frame(last_id, last_data);
          repeat (DELAY_SHORT) @(posedge clk);
          send_frame(8'h95, cmd);
          send_frame(8'h8A, sp);
        end
        8'h01: begin
          send_frame(last_id, last_data);
          repeat (DELAY_SHORT) @(posedge clk);
          send_frame(8'h96, VERSION);
          send_frame(8'h8B, 24'h000003);
        end
        default: begin
          if (last_id == 8'h55) sp = last_data;
          if (last_id == 8'h4A) cmd = last_data;
          send_frame(last_id, last_data);
        end
      endcase
    end
  end
endmodule
