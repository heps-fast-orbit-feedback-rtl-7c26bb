// tb_psc_channel: runs every request type of the protocol table against the behavioural
// power-supply controller and checks the readbacks, the echo check, the number of
// answer frames, the CRC error count (one corrupted answer) and the timeout with the
// controller disconnected. It also checks the length of a set-only exchange.
module tb_psc_channel;
  import fofb_pkg::*;
  localparam int CPB = 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] req_id;
  logic [23:0] req_data;
  logic busy, done, txd, rxd, psc_txd, link_ok, cut;
  logic [23:0] rb_status, rb_current, rb_command, rb_spback, rb_version, rb_config;
  logic [15:0] crc_err_cnt, timeout_cnt;
  int checks = 0, failures = 0;

  psc_channel #(.CLKS_PER_BIT(CPB), .TIMEOUT(2000)) dut (.*);
  psc_model #(.CLKS_PER_BIT(CPB)) psc (.clk, .rxd(txd), .txd(psc_txd));
  assign rxd = cut ? 1'b1 : psc_txd;

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic req(input logic [7:0] i, input logic [23:0] d, output int cycles);
    @(posedge clk);
    req_id <= i; req_data <= d; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cycles = 1;
    while (!done) begin
      @(posedge clk);
      cycles++;
    end
    @(posedge clk);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    cut = 0; req_id = 0; req_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    req(ID_SET_SP_READ, 24'h070652, cyc);
    chk(link_ok, "0x15 ok");
    chk(rb_status == 24'h000001 && rb_current == 24'h070652 && rb_spback == 24'h070652, "0x15 readbacks");
    chk(psc.sp == 24'h070652, "psc setpoint set");
    req(ID_SET_CMD_READ, 24'h00000A, cyc);
    chk(link_ok && rb_command == 24'h00000A, "0x0A command readback");
    req(ID_SET_SP, 24'h123456, cyc);
    chk(link_ok && psc.sp == 24'h123456, "0x55 set only");
    // request + echo, each 43 bit periods, plus a few cycles of turnaround
    chk(cyc > 2 * 43 * CPB && cyc < 2 * 43 * CPB + 30, "0x55 exchange length");
    chk(rb_spback == 24'h070652, "0x55 reads nothing back");
    req(ID_READ_SP_CMD, 24'h0, cyc);
    chk(link_ok && rb_spback == 24'h123456 && rb_command == 24'h00000A, "0x00 readbacks");
    req(ID_READ_CFG, 24'h0, cyc);
    chk(link_ok && rb_version == 24'h000123 && rb_config == 24'h000003, "0x01 configuration");
    req(ID_READ_ALL, 24'h0, cyc);
    chk(link_ok && rb_current == 24'h123456, "0x40 readbacks");
    // read-all takes five frames and the 4.3 us controller delay
    chk(cyc > 6 * 43 * CPB + 430, "0x40 exchange length");
    req(ID_SET_CMD, 24'h000005, cyc);
    chk(link_ok && psc.cmd == 24'h000005, "0x4A command only");
    req(ID_RESERVED, 24'h0, cyc);
    chk(link_ok, "0x02 echo");
    chk(crc_err_cnt == 0 && timeout_cnt == 0, "no errors so far");
    psc.corrupt_next = 1'b1;
    req(ID_SET_SP, 24'h000777, cyc);
    chk(!link_ok && crc_err_cnt == 1, "corrupted echo detected");
    req(ID_SET_SP, 24'h000778, cyc);
    chk(link_ok, "recovers after a bad frame");
    cut = 1;
    req(ID_SET_SP, 24'h000779, cyc);
    chk(!link_ok && timeout_cnt == 1, "timeout without answer");
    chk(cyc >= 2000, "timeout length");
    cut = 0;
    repeat (10) @(posedge clk);
    req(ID_SET_SP_READ, 24'h00077A, cyc);
    chk(link_ok && rb_current == 24'h00077A, "recovers after timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
