// psc_crc8: CRC-8 of the power-supply link frame.
//
// Polynomial x^8+x^7+x^5+x^4+x+1 (0xB3 without the x^8 term) over the 8-bit ID followed
// by the 24-bit data word; start and stop bits are not covered. The polynomial and the
// covered fields follow the system description. Bit order (most significant bit first)
// and the initial value 0x00 are this design's choices. Purely combinational: the CRC
// is valid in the same cycle as its inputs.
module psc_crc8
  import fofb_pkg::*;
(
  input  logic [7:0]      id,
  input  logic [SP_W-1:0] data,
  output logic [7:0]      crc
);
  logic [31:0] msg;
  assign msg = {id, data};

  always_comb begin
    logic [7:0] c;
    logic       fb;
    c = 8'h00;
    for (int i = 31; i >= 0; i--) begin
      fb = c[7] ^ msg[i];
      c  = {c[6:0], 1'b0};
      if (fb) c = c ^ CRC8_POLY;
    end
    crc = c;
  end
endmodule
