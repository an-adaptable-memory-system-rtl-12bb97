// rr_row_decoder: row decoder of the RRDRAM.
//
// Turns the latched row address into one active ROW line out of ROWS. The
// lines are only driven while a valid access needs them (en high, which is
// the LS cycle of an access); otherwise all are low. The ROW lines run past
// the row latches of every segment; only the segment whose RlClk is active
// stores them. Purely combinational.
//
// The decoder and its gating by a valid access follow the document; tying
// the enable to the LS cycle is this design's timing.
module rr_row_decoder #(
  parameter int unsigned ROWS  = rr_pkg::ROWS,
  parameter int unsigned ROW_W = $clog2(ROWS)
) (
  input  logic [ROW_W-1:0] row,
  input  logic             en,
  output logic [ROWS-1:0]  row_lines
);

  always_comb begin
    row_lines = '0;
    if (en)
      row_lines[row] = 1'b1;
  end

endmodule
