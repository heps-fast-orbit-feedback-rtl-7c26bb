// tb_psc_interface: four power-supply links, each with its own behavioural controller.
// Checks that every controller receives its own setpoint, that a command request sends
// the common command word, that every readback lands in its own array, that `done` waits for the slowest link, and that one
// disconnected link times out while the others stay good.
module tb_psc_interface;
  import fofb_pkg::*;
  localparam int N = 4, CPB = 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] req_id;
  logic [23:0] cmd_data;
  logic [23:0] setpoint [N];
  logic busy, done;
  logic [N-1:0] txd, rxd, m_txd, link_ok;
  logic [N-1:0] cut;
  logic [23:0] rb_status [N], rb_current [N], rb_spback [N];
  logic [23:0] rb_command [N], rb_version [N], rb_config [N];
  logic [15:0] crc_err_total, timeout_total;
  int checks = 0, failures = 0;

  psc_interface #(.N(N), .CLKS_PER_BIT(CPB), .TIMEOUT(1500)) dut (.*);
  for (genvar i = 0; i < N; i++) begin : g_m
    psc_model #(.CLKS_PER_BIT(CPB)) m (.clk, .rxd(txd[i]), .txd(m_txd[i]));
    assign rxd[i] = cut[i] ? 1'b1 : m_txd[i];
  end

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(input logic [7:0] i, output int cyc);
    @(posedge clk);
    req_id <= i; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cyc = 1;
    while (!done) begin
      @(posedge clk);
      cyc++;
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    cut = '0; req_id = 0; cmd_data = 24'h00000C;
    for (int i = 0; i < N; i++) setpoint[i] = 24'(24'h070600 + i);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    run(ID_SET_SP_READ, cyc);
    for (int i = 0; i < N; i++) begin
      chk(rb_current[i] == 24'(24'h070600 + i), "own setpoint read back");
      chk(rb_status[i] == 24'h000001, "status");
    end
    chk(link_ok == '1, "all links good");
    chk(g_m[2].m.sp == 24'h070602, "controller 2 holds its setpoint");
    run(ID_SET_CMD, cyc);
    chk(g_m[0].m.cmd == 24'h00000C && g_m[3].m.cmd == 24'h00000C, "command broadcast");
    chk(g_m[1].m.sp == 24'h070601, "command leaves setpoint");
    run(ID_READ_CFG, cyc);
    for (int i = 0; i < N; i++)
      chk(rb_version[i] == 24'h000123 && rb_config[i] == 24'h000003, "version and configuration");
    run(ID_READ_SP_CMD, cyc);
    for (int i = 0; i < N; i++)
      chk(rb_command[i] == 24'h00000C && rb_spback[i] == 24'(24'h070600 + i), "command and setpoint readback");
    cut[1] = 1'b1;
    run(ID_SET_SP, cyc);
    chk(link_ok == 4'b1101, "link 1 down, others good");
    chk(timeout_total == 1 && crc_err_total == 0, "one timeout counted");
    chk(cyc > 1500, "done waits for the slowest link");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
