// tb_fofb_pid: four channels (two per plane) over several cycles with random inputs.
// The testbench keeps its own integrals and previous inputs and checks every setpoint,
// the per-plane gains, the output bit position, saturation at both ends, clearing of the
// integrals and the N_CH+1 cycle processing time.
module tb_fofb_pid;
  import fofb_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, start = 0, clear_int = 0, done;
  logic signed [63:0] err [N];
  logic signed [31:0] kp_x, ki_x, kd_x, kp_y, ki_y, kd_y;
  logic [5:0] trunc;
  logic [23:0] setpoint [N];
  logic [N-1:0] sat;
  int checks = 0, failures = 0;
  longint integ [N], eprev [N];
  int cyc = 0, t_start = 0, t_done = 0;
  int n_sat = 0;

  fofb_pid #(.N_CH(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (done) t_done <= cyc;
    if (start) t_start <= cyc;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    int t0;
    t0 = t_done;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    wait (t_done != t0);
    @(posedge clk);
    checks++;
    if (t_done - t_start != N + 1) begin
      failures++;
      $display("FAIL latency %0d", t_done - t_start);
    end
    for (int c = 0; c < N; c++) begin
      longint kp, ki, kd, u, v, e, expv;
      bit s;
      e = err[c];
      kp = (c < N / 2) ? kp_x : kp_y;
      ki = (c < N / 2) ? ki_x : ki_y;
      kd = (c < N / 2) ? kd_x : kd_y;
      integ[c] += e;
      u = (kp * e + ki * integ[c] + kd * (e - eprev[c])) >>> 16;
      eprev[c] = e;
      v = u >>> trunc;
      s = 0;
      if (v > 8388607) begin expv = 8388607; s = 1; end
      else if (v < -8388608) begin expv = -8388608; s = 1; end
      else expv = v;
      if (s) n_sat++;
      checks++;
      if (setpoint[c] != 24'(expv) || sat[c] != s) begin
        failures++;
        $display("FAIL ch %0d got %h exp %h sat %b", c, setpoint[c], 24'(expv), sat[c]);
      end
    end
  endtask

  initial begin
    kp_x = 32'sd32768; ki_x = 32'sd6554; kd_x = 32'sd13107;    // 0.5 0.1 0.2
    kp_y = -32'sd65536; ki_y = 32'sd3277; kd_y = 32'sd0;        // -1 0.05 0
    trunc = 6'd4;
    for (int c = 0; c < N; c++) begin
      err[c] = 0; integ[c] = 0; eprev[c] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 6; it++) begin
      for (int c = 0; c < N; c++) err[c] = 64'($signed(32'($urandom)) >>> 4);
      step();
    end
    trunc = 6'd0;
    err[0] = 64'sd200000000; err[3] = -64'sd200000000;    // drive into saturation
    step();
    trunc = 6'd10;
    step();
    clear_int = 1'b1;
    @(posedge clk);
    clear_int <= 1'b0;
    for (int c = 0; c < N; c++) begin
      integ[c] = 0; eprev[c] = 0;
    end
    step();
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("FAIL saturation never reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
