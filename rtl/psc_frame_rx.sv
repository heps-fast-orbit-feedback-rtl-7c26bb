// psc_frame_rx: deserialiser and checker for power-supply link frames.
//
// The serial input is synchronised with two flip-flops. A falling edge on an idle line
// starts a frame; every bit is sampled in the middle of its CLKS_PER_BIT-cycle period.
// After 43 bits the frame is checked: start bit '0', stop bits "11" and the CRC-8 of
// ID and data. `valid` pulses for one cycle with the ID and data; `crc_ok` and `frame_ok`
// tell whether the checks passed. Frame layout and CRC follow the system description;
// the sampling scheme is this design's choice. `valid` follows the middle of the last
// stop bit by three cycles (two synchroniser stages and the output register).
module psc_frame_rx
  import fofb_pkg::*;
#(
  parameter int CLKS_PER_BIT = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            rxd,
  output logic            valid,
  output logic [7:0]      id,
  output logic [SP_W-1:0] data,
  output logic            crc_ok,
  output logic            frame_ok
);
  logic [1:0]            sync;
  logic                  busy;
  logic [FRAME_BITS-1:0] sh;
  logic [5:0]            nbits;
  localparam int DIVW = $clog2(CLKS_PER_BIT + 1);
  logic [DIVW-1:0]       div;
  logic [7:0]            crc_calc;
  logic                  last_sample;

  psc_crc8 u_crc (.id(sh[41:34]), .data(sh[33:10]), .crc(crc_calc));

  // A frame is complete when the last bit has been shifted in (checked one cycle later).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync        <= 2'b11;
      busy        <= 1'b0;
      sh          <= '0;
      nbits       <= '0;
      div         <= '0;
      last_sample <= 1'b0;
      valid       <= 1'b0;
      id          <= '0;
      data        <= '0;
      crc_ok      <= 1'b0;
      frame_ok    <= 1'b0;
    end else begin
      sync        <= {sync[0], rxd};
      valid       <= 1'b0;
      last_sample <= 1'b0;
      if (!busy) begin
        if (!sync[1]) begin
          busy  <= 1'b1;
          nbits <= '0;
          div   <= DIVW'(CLKS_PER_BIT - 1 - CLKS_PER_BIT / 2);
        end
      end else if (div == DIVW'(CLKS_PER_BIT - 1)) begin
        div   <= '0;
        sh    <= {sh[FRAME_BITS-2:0], sync[1]};
        nbits <= nbits + 1'b1;
        if (nbits == 6'(FRAME_BITS - 1)) begin
          busy        <= 1'b0;
          last_sample <= 1'b1;
        end
      end else begin
        div <= div + 1'b1;
      end
      if (last_sample) begin
        valid    <= 1'b1;
        id       <= sh[41:34];
        data     <= sh[33:10];
        crc_ok   <= (crc_calc == sh[9:2]);
        frame_ok <= (sh[42] == 1'b0) && (sh[1:0] == 2'b11);
      end
    end
  end
endmodule
