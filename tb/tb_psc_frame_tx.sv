// tb_psc_frame_tx: sends frames and decodes the serial line in the testbench: start bit,
// ID, data, CRC (by polynomial division), stop bits, idle level and the frame duration of
// 43 bit periods.
module tb_psc_frame_tx;
  import fofb_pkg::*;
  localparam int CPB = 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] id;
  logic [23:0] data;
  logic busy, done, txd;
  int checks = 0, failures = 0;

  psc_frame_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;

  int cyc = 0, t_start = 0, t_done = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (start && !busy) t_start <= cyc;
    if (done) t_done <= cyc;
  end

  function automatic logic [7:0] crc_ref(input logic [31:0] m);
    logic [39:0] r;
    r = {m, 8'h00};
    for (int i = 39; i >= 8; i--) if (r[i]) r[i-:9] = r[i-:9] ^ 9'h1B3;
    return r[7:0];
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic send_and_check(input logic [7:0] i, input logic [23:0] d);
    logic [42:0] f;
    @(posedge clk);
    id <= i; data <= d; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    // first bit is on the line now; sample in the middle of each bit
    repeat (CPB / 2) @(posedge clk);
    for (int k = 42; k >= 0; k--) begin
      f[k] = txd;
      repeat (CPB) @(posedge clk);
    end
    chk(f[42] == 1'b0, "start bit");
    chk(f[41:34] == i, "id");
    chk(f[33:10] == d, "data");
    chk(f[9:2] == crc_ref({i, d}), "crc");
    chk(f[1:0] == 2'b11, "stop bits");
    wait (t_done > t_start);
    // done is seen one cycle after 43 whole bit periods
    chk(t_done - t_start == 43 * CPB + 1, "done timing");
    @(posedge clk);
    chk(!busy && txd == 1'b1, "idle high after frame");
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    id = 0; data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    chk(txd == 1'b1 && !busy, "idle after reset");
    send_and_check(8'h15, 24'h070652);
    send_and_check(8'h55, 24'h800001);
    for (int n = 0; n < 20; n++) send_and_check(8'($urandom), 24'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
