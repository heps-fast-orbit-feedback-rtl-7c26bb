// tb_psc_frame_rx: drives serial frames into the receiver, good ones and ones with a
// wrong CRC, a wrong stop bit or a wrong start level, back to back and with gaps, and
// checks the decoded ID, data and check flags.
module tb_psc_frame_rx;
  import fofb_pkg::*;
  localparam int CPB = 4;
  logic clk = 0, rst_n = 0, rxd = 1;
  logic valid, crc_ok, frame_ok;
  logic [7:0] id;
  logic [23:0] data;
  int checks = 0, failures = 0;
  int n_valid = 0;
  logic [7:0] got_id;
  logic [23:0] got_data;
  logic got_crc, got_frame;

  psc_frame_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (valid) begin
    n_valid++;
    got_id = id; got_data = data; got_crc = crc_ok; got_frame = frame_ok;
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

  // kind: 0 good, 1 bad crc, 2 bad stop bit
  task automatic send(input logic [7:0] i, input logic [23:0] d, input int kind, input int gap);
    logic [42:0] f;
    int n0;
    f = {1'b0, i, d, crc_ref({i, d}), 2'b11};
    if (kind == 1) f[5] = ~f[5];
    if (kind == 2) f[0] = 1'b0;
    n0 = n_valid;
    for (int k = 42; k >= 0; k--) begin
      rxd <= f[k];
      repeat (CPB) @(posedge clk);
    end
    rxd <= 1'b1;
    repeat (6) @(posedge clk);
    chk(n_valid == n0 + 1, "one frame decoded");
    chk(got_id == i && got_data == d, "id/data");
    chk(got_crc == (kind != 1), "crc flag");
    chk(got_frame == (kind != 2), "frame flag");
    repeat (gap) @(posedge clk);
  endtask

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    send(8'h93, 24'h000001, 0, 0);
    send(8'h90, 24'h070626, 0, 3);
    send(8'h8A, 24'h070650, 1, 0);
    send(8'h95, 24'h000001, 2, 10);
    for (int n = 0; n < 40; n++) send(8'($urandom), 24'($urandom), n % 3, n % 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
