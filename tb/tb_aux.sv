// tb_aux: trigger edges become single pulses three cycles later and are counted, a
// level held high gives one pulse only; a sensor over the limit for fewer than DEBOUNCE
// readings does not switch off, DEBOUNCE readings in a row do, the shutdown holds until
// cleared, and the hottest reading per sensor is kept.
module tb_aux;
  localparam int NT = 4, NS = 3, DB = 4;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [NT-1:0] trig_in = '0, trig_out;
  logic [15:0] trig_cnt [NT];
  logic [NS-1:0] temp_valid = '0, over_temp;
  logic [11:0] temp [NS], temp_max [NS];
  logic [11:0] temp_limit = 12'd800;
  logic power_off;
  int checks = 0, failures = 0;
  int cyc = 0, n_pulse [NT], t_pulse [NT];

  aux #(.N_TRIG(NT), .N_TEMP(NS), .DEBOUNCE(DB)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int t = 0; t < NT; t++) if (trig_out[t] && rst_n) begin
      n_pulse[t]++;
      t_pulse[t] = cyc;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic reading(input int s, input int v);
    @(posedge clk);
    temp_valid[s] <= 1'b1;
    temp[s] <= 12'(v);
    @(posedge clk);
    temp_valid[s] <= 1'b0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    for (int t = 0; t < NT; t++) begin n_pulse[t] = 0; t_pulse[t] = 0; end
    for (int s = 0; s < NS; s++) temp[s] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int t = 0; t < NT; t++) begin
      @(posedge clk);
      trig_in[t] <= 1'b1;
      t0 = cyc;
      repeat (10) @(posedge clk);
      trig_in[t] <= 1'b0;
      repeat (3) @(posedge clk);
      chk(n_pulse[t] == 1, "one pulse per edge");
      chk(t_pulse[t] - t0 == 4, "pulse delay");
      chk(trig_cnt[t] == 1, "trigger counted");
    end
    for (int n = 0; n < 5; n++) begin
      @(posedge clk);
      trig_in[1] <= 1'b1;
      repeat (2) @(posedge clk);
      trig_in[1] <= 1'b0;
      repeat (2) @(posedge clk);
    end
    repeat (4) @(posedge clk);
    chk(trig_cnt[1] == 6 && n_pulse[1] == 6, "FA pulses counted");
    // sensor 0 over the limit DB-1 times, then back: no shutdown
    for (int n = 0; n < DB - 1; n++) reading(0, 900);
    reading(0, 500);
    @(posedge clk);
    chk(!power_off, "short excursion tolerated");
    chk(temp_max[0] == 900, "maximum kept");
    for (int n = 0; n < DB - 1; n++) reading(2, 850 + n);
    @(posedge clk);
    chk(!power_off, "not yet");
    reading(2, 820);
    @(posedge clk);
    chk(power_off && over_temp == 3'b100, "shutdown on sensor 2");
    reading(2, 300);
    @(posedge clk);
    chk(power_off, "shutdown latched");
    @(posedge clk);
    clear <= 1'b1;
    @(posedge clk);
    clear <= 1'b0;
    @(posedge clk);
    chk(!power_off && over_temp == 0, "cleared");
    chk(temp_max[2] == 852 && temp_max[1] == 0, "maxima per sensor");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
