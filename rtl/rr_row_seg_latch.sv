// rr_row_seg_latch: the row segment latches RLS0..RLSn of the RRDRAM.
//
// One latch per row segment, each made of ROWS flip-flops, NSEG x ROWS in
// all. Every flip-flop of segment s takes its D input from one ROW line of
// the row decoder and is loaded when RlClk[s] is active, so exactly the
// flip-flop of the decoded row becomes 1. Its Q output drives the word line
// of that row inside segment s only. Segments hold different rows at the
// same time, which forms the adaptable logical row out of parts of several
// physical rows.
//
// pre[s] clears segment s at the end of its precharge, turning its word
// line off. Load and clear in the same cycle: load wins (it does not happen
// with the sequencer of this design). Timing: word lines change at the
// clock edge where rlclk or pre is sampled.
//
// The flip-flop array follows the document; RlClk as a load enable on the
// common clock, and the clear at precharge, are this design's choices.
module rr_row_seg_latch #(
  parameter int unsigned ROWS = rr_pkg::ROWS,
  parameter int unsigned NSEG = rr_pkg::NSEG
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [ROWS-1:0]            row_lines,
  input  logic [NSEG-1:0]            rlclk,
  input  logic [NSEG-1:0]            pre,
  output logic [NSEG-1:0][ROWS-1:0]  wl
);

  for (genvar s = 0; s < NSEG; s++) begin : g_seg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)        wl[s] <= '0;
      else if (rlclk[s]) wl[s] <= row_lines;
      else if (pre[s])   wl[s] <= '0;
    end
  end

endmodule
