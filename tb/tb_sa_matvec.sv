// tb_sa_matvec: a 5 x 40 array (two lanes, the default) with random coefficients and
// random samples, fed two per cycle with random gaps. Results are compared with a product
// computed in the testbench, for two vectors in a row (accumulators cleared by start),
// and `done` is checked to come N_OUT cycles after the last pair enters.
module tb_sa_matvec;
  localparam int NI = 40, NO = 5, L = 2;
  logic clk = 0, rst_n = 0;
  logic cw_we = 0, start = 0, in_valid = 0, done;
  logic [$clog2(NO)-1:0] cw_row;
  logic [$clog2(NI)-1:0] cw_col;
  logic signed [31:0] cw_data, in_data [L];
  logic signed [63:0] result [NO];
  logic signed [31:0] A [NO][NI];
  logic signed [31:0] xv [NI];
  int checks = 0, failures = 0;
  int cyc = 0, t_last = 0, t_done = 0;

  sa_matvec #(.N_IN(NI), .N_OUT(NO)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (done) t_done <= cyc;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_vector();
    logic signed [63:0] ref_r;
    int n;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    for (int i = 0; i < NI; i++) xv[i] = 32'($urandom);
    n = 0;
    while (n < NI) begin
      @(posedge clk);
      if ($urandom % 3 != 0) begin
        in_valid <= 1'b1;
        for (int l = 0; l < L; l++) in_data[l] <= xv[n + l];
        n += L;
        if (n == NI) t_last = cyc + 1;   // edge at which the last sample enters
      end else begin
        in_valid <= 1'b0;
      end
    end
    @(posedge clk);
    in_valid <= 1'b0;
    wait (t_done > t_last);
    @(posedge clk);
    checks++;
    if (t_done - t_last != NO + 1) begin
      failures++;
      $display("FAIL done latency %0d", t_done - t_last);
    end
    for (int j = 0; j < NO; j++) begin
      ref_r = 0;
      for (int i = 0; i < NI; i++) ref_r += 64'(A[j][i]) * 64'(xv[i]);
      checks++;
      if (result[j] != ref_r) begin
        failures++;
        $display("FAIL row %0d got %0d exp %0d", j, result[j], ref_r);
      end
    end
  endtask

  initial begin
    for (int l = 0; l < L; l++) in_data[l] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int j = 0; j < NO; j++)
      for (int i = 0; i < NI; i++) begin
        A[j][i] = 32'($urandom);
        @(posedge clk);
        cw_we <= 1'b1; cw_row <= 3'(j); cw_col <= 6'(i); cw_data <= A[j][i];
      end
    @(posedge clk);
    cw_we <= 1'b0;
    run_vector();
    run_vector();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
