// psc_frame_tx: serialiser for one power-supply link frame.
//
// A frame is Start(1)='0', ID(8), Data(24), CRC(8), Stop(2)="11", 43 bits, sent most
// significant field and bit first; the line idles at '1'. The field layout follows the
// system description; the bit order, idle level and the bit period of CLKS_PER_BIT clock
// cycles (4 cycles at 100 MHz, 1.72 us per frame) are this design's choices.
// Timing: `start` is taken when `busy` is low; the start bit appears on `txd` the next
// cycle and `done` pulses for one cycle after the last stop bit, 43*CLKS_PER_BIT cycles
// after `start`.
module psc_frame_tx
  import fofb_pkg::*;
#(
  parameter int CLKS_PER_BIT = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [7:0]      id,
  input  logic [SP_W-1:0] data,
  output logic            busy,
  output logic            done,
  output logic            txd
);
  logic [7:0]            crc;
  logic [FRAME_BITS-1:0] sh;
  logic [5:0]            bits_left;
  localparam int DIVW = $clog2(CLKS_PER_BIT + 1);
  logic [DIVW-1:0]       div;

  psc_crc8 u_crc (.id(id), .data(data), .crc(crc));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh        <= '1;
      bits_left <= '0;
      div       <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          sh        <= {1'b0, id, data, crc, 2'b11};
          bits_left <= 6'(FRAME_BITS);
          div       <= '0;
          busy      <= 1'b1;
        end
      end else if (div == DIVW'(CLKS_PER_BIT - 1)) begin
        div <= '0;
        sh  <= {sh[FRAME_BITS-2:0], 1'b1};
        if (bits_left == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        bits_left <= bits_left - 1'b1;
      end else begin
        div <= div + 1'b1;
      end
    end
  end

  assign txd = busy ? sh[FRAME_BITS-1] : 1'b1;
endmodule
