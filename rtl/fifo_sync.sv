// fifo_sync: single-clock FIFO, DEPTH entries of type T (DEPTH a power of two).
//
// Writes with `wr_en` while not full, reads with `rd_en` while not empty; the head entry
// is shown on `rd_data` (first-word fall-through). A write while full is dropped and
// counted in `overflow_cnt`. Used as the receive buffer of each BPM link of the FOFB
// controller; a helper of this design, not named in the system description.
module fifo_sync #(
  parameter type T     = logic [7:0],
  parameter int  DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  T            wr_data,
  input  logic        rd_en,
  output T            rd_data,
  output logic        empty,
  output logic        full,
  output logic [15:0] overflow_cnt
);
  localparam int AW = $clog2(DEPTH);

  T            mem [DEPTH];
  logic [AW:0] wp, rp;

  assign empty   = (wp == rp);
  assign full    = (wp[AW-1:0] == rp[AW-1:0]) && (wp[AW] != rp[AW]);
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp           <= '0;
      rp           <= '0;
      overflow_cnt <= '0;
    end else begin
      if (wr_en && !full) wp <= wp + 1'b1;
      if (wr_en && full) overflow_cnt <= overflow_cnt + 1'b1;
      if (rd_en && !empty) rp <= rp + 1'b1;
    end
  end
endmodule
