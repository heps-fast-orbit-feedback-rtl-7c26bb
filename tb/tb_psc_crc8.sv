// tb_psc_crc8: checks the link CRC-8 against polynomial long division by
// x^8+x^7+x^5+x^4+x+1 for fixed and random ID/data words.
module tb_psc_crc8;
  import fofb_pkg::*;
  logic [7:0]  id;
  logic [23:0] data;
  logic [7:0]  crc;
  int checks = 0, failures = 0;

  psc_crc8 dut (.id, .data, .crc);

  function automatic logic [7:0] crc_ref(input logic [31:0] m);
    logic [39:0] r;
    r = {m, 8'h00};
    for (int i = 39; i >= 8; i--) if (r[i]) r[i-:9] = r[i-:9] ^ 9'h1B3;
    return r[7:0];
  endfunction

  task automatic check(input logic [7:0] i, input logic [23:0] d);
    id = i; data = d;
    #1;
    checks++;
    if (crc !== crc_ref({i, d})) begin
      failures++;
      $display("FAIL id=%h data=%h crc=%h exp=%h", i, d, crc, crc_ref({i, d}));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(8'h00, 24'h000000);
    check(8'h15, 24'h070652);
    check(8'h93, 24'h000001);
    check(8'hFF, 24'hFFFFFF);
    // a single message bit set gives x^(k+8) mod P; bit 0 of the data gives the polynomial
    check(8'h00, 24'h000001);
    checks++;
    if (crc !== 8'hB3) failures++;
    for (int n = 0; n < 500; n++) check(8'($urandom), 24'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
