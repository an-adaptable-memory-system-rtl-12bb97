// rr_col_dec_latch: the column decoder latch of the RRDRAM.
//
// Holds the decoded column of every access in flight, one flip-flop per
// column. When an access is in its LS cycle (load high) its one-hot column
// is ORed in, while the feedback keeps the columns stored by earlier
// accesses, so several columns - at most one per segment - are active at
// once. The bits of segment s are cleared at the end of that segment's
// precharge (clr_seg[s]); a load in the same cycle is kept. Timing: q
// changes at the clock edge.
//
// The latch with its feedback follows the document; clearing a segment's
// bits at the end of its precharge is this design's choice.
module rr_col_dec_latch #(
  parameter int unsigned COLS = rr_pkg::COLS,
  parameter int unsigned NSEG = rr_pkg::NSEG,
  localparam int unsigned SEG_COLS = COLS / NSEG
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [COLS-1:0] col_lines,
  input  logic            load,
  input  logic [NSEG-1:0] clr_seg,
  output logic [COLS-1:0] q
);

  logic [COLS-1:0] keep_mask;

  always_comb begin
    for (int s = 0; s < NSEG; s++)
      keep_mask[s*SEG_COLS +: SEG_COLS] = {SEG_COLS{!clr_seg[s]}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= (q & keep_mask) | (load ? col_lines : '0);
  end

endmodule
