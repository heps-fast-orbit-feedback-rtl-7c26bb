// sa_matvec: systolic matrix-vector product for the orbit correction.
//
// result[j] = sum over i of coef[j][i] * in[i], for N_OUT correctors and N_IN BPMs: the
// inverse response matrix rows of this station's correctors applied to the orbit error.
// The array is a chain of N_OUT processing elements (PEs). The error samples enter PE 0
// in index order, LANES samples per valid cycle (indices g*LANES .. g*LANES+LANES-1 in
// group g), and move one PE further every cycle. Each PE holds its own matrix row in
// LANES memory banks (bank l holds the columns i with i mod LANES = l), reads the
// LANES coefficients for the group passing through and adds the LANES products to its
// accumulator. The systolic structure follows the system description; LANES = 2 is
// chosen so that the correction calculation fits the 392 clock edges of the reference system
// (576/2 + 12 + PID). The banked row-per-PE memory and the widths are this design's
// choices. N_IN must be a multiple of LANES.
// Timing: `start` clears the accumulators. `done` is raised by the N_OUT-th clock edge
// after the edge that takes in the last of the N_IN/LANES groups (N_IN/LANES+N_OUT
// cycles for an unbroken stream); all results are then valid until the next `start`.
// Coefficients are written through cw_* at any time outside a calculation.
module sa_matvec #(
  parameter int N_IN   = 576,
  parameter int N_OUT  = 12,
  parameter int LANES  = 2,
  parameter int DATA_W = 32,
  parameter int COEF_W = 32,
  parameter int ACC_W  = 64
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          cw_we,
  input  logic [$clog2(N_OUT)-1:0]      cw_row,
  input  logic [$clog2(N_IN)-1:0]       cw_col,
  input  logic signed [COEF_W-1:0]      cw_data,
  input  logic                          start,
  input  logic                          in_valid,
  input  logic signed [DATA_W-1:0]      in_data [LANES],
  output logic                          done,
  output logic signed [ACC_W-1:0]       result [N_OUT]
);
  localparam int NG = N_IN / LANES;            // groups per vector
  localparam int GW = (NG > 1) ? $clog2(NG) : 1;

  // group stream entering each PE: valid, data, group number, last
  logic              pv [N_OUT+1];
  logic signed [DATA_W-1:0] pd [N_OUT+1][LANES];
  logic [GW-1:0]     pi [N_OUT+1];
  logic              pl [N_OUT+1];
  logic [GW-1:0]     in_cnt;
  logic              mac_last [N_OUT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_cnt <= '0;
    else if (start) in_cnt <= '0;
    else if (in_valid) in_cnt <= (in_cnt == GW'(NG - 1)) ? '0 : in_cnt + 1'b1;
  end

  assign pv[0] = in_valid && !start;
  assign pd[0] = in_data;
  assign pi[0] = in_cnt;
  assign pl[0] = (in_cnt == GW'(NG - 1));

  for (genvar j = 0; j < N_OUT; j++) begin : g_pe
    logic signed [COEF_W-1:0] c_q [LANES];
    logic signed [DATA_W-1:0] d_q [LANES];
    logic                     v_q, l_q;
    logic signed [ACC_W-1:0]  acc, sum;

    for (genvar l = 0; l < LANES; l++) begin : g_bank
      logic signed [COEF_W-1:0] row_mem [NG];
      always_ff @(posedge clk) begin
        if (cw_we && cw_row == ($clog2(N_OUT))'(j) && 32'(cw_col) % LANES == l)
          row_mem[GW'(32'(cw_col) / LANES)] <= cw_data;
        c_q[l] <= row_mem[pi[j]];
      end
    end

    always_comb begin
      sum = '0;
      for (int l = 0; l < LANES; l++) sum = sum + ACC_W'(c_q[l] * d_q[l]);
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v_q         <= 1'b0;
        l_q         <= 1'b0;
        d_q         <= '{default: '0};
        acc         <= '0;
        pv[j+1]     <= 1'b0;
        pd[j+1]     <= '{default: '0};
        pi[j+1]     <= '0;
        pl[j+1]     <= 1'b0;
        mac_last[j] <= 1'b0;
      end else begin
        // pass the group on to the next PE
        pv[j+1] <= pv[j];
        pd[j+1] <= pd[j];
        pi[j+1] <= pi[j];
        pl[j+1] <= pv[j] && pl[j];
        // coefficient read takes one cycle
        v_q <= pv[j];
        l_q <= pv[j] && pl[j];
        d_q <= pd[j];
        mac_last[j] <= v_q && l_q;
        if (start) acc <= '0;
        else if (v_q) acc <= acc + sum;
      end
    end
    assign result[j] = acc;
  end

  assign done = mac_last[N_OUT-1];
endmodule
