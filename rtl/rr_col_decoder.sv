// rr_col_decoder: column decoder and segment decoder of the RRDRAM.
//
// The column address selects one of COLS columns. Its upper bits name the
// row segment the column lies in (COLS/NSEG columns per segment); the
// segment decoder turns them into one active RlClk line, the load strobe of
// that segment's row latch. Both outputs are one-hot while en is high (the
// LS cycle of an access) and all-low otherwise. Purely combinational.
//
// In the document RlClk is a clock of the latch flip-flops; here, in a
// single-clock design, it is a load enable sampled at the clock edge.
module rr_col_decoder #(
  parameter int unsigned COLS  = rr_pkg::COLS,
  parameter int unsigned NSEG  = rr_pkg::NSEG,
  parameter int unsigned COL_W = $clog2(COLS),
  parameter int unsigned SEG_W = $clog2(NSEG)
) (
  input  logic [COL_W-1:0] col,
  input  logic             en,
  output logic [COLS-1:0]  col_lines,
  output logic [NSEG-1:0]  rlclk
);

  logic [SEG_W-1:0] seg;
  assign seg = col[COL_W-1 -: SEG_W];

  always_comb begin
    col_lines = '0;
    rlclk     = '0;
    if (en) begin
      col_lines[col] = 1'b1;
      rlclk[seg]     = 1'b1;
    end
  end

endmodule
