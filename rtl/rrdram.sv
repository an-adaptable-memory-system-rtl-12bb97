// rrdram: reconfigurable row DRAM device.
//
// A DRAM whose physical rows are cut into NSEG row segments, each with its
// own row latch (RLS). An access opens only its segment of a row, so up to
// NSEG segments can hold parts of NSEG different physical rows at once: an
// adaptable logical row. Accesses to different segments are pipelined: a
// new one can start every two cycles and its data follows READ_LAT cycles
// after its row address, whatever rows the accesses hit.
//
// Interface: a conventional multiplexed address bus. Cycle with ras_n low:
// addr is a row. Cycle with cas_n low: addr is a column, we_n and din are
// sampled too. Read data appears on dout with dout_valid high for one
// cycle, READ_LAT = 4 + T_RD + T_CAC cycles after the RAS cycle (6 with the
// default one-cycle waits). The column's upper SEG_W bits pick the segment.
// A segment accepts a new access only after its previous one has
// precharged: two accesses to one segment need RAS cycles at least
// 2 + T_RD + T_CAC + T_PR apart (5 by default); the controller keeps to
// that. seg_busy shows which segments hold an access.
//
// Data path: address latches -> row decoder and column/segment decoder ->
// row segment latches (word lines) and column decoder latch (column
// enables) -> per-segment cell array and sense amps -> output data latch.
// The structure follows the document; the device width, the write path
// and the one-cycle waits of the sequencer are this design's reading.
module rrdram #(
  parameter int unsigned ROWS   = rr_pkg::ROWS,
  parameter int unsigned COLS   = rr_pkg::COLS,
  parameter int unsigned NSEG   = rr_pkg::NSEG,
  parameter int unsigned DATA_W = rr_pkg::DATA_W,
  parameter int unsigned T_RD   = rr_pkg::T_RD_CYC,
  parameter int unsigned T_CAC  = rr_pkg::T_CAC_CYC,
  parameter int unsigned T_PR   = rr_pkg::T_PR_CYC,
  localparam int unsigned ROW_W    = $clog2(ROWS),
  localparam int unsigned COL_W    = $clog2(COLS),
  localparam int unsigned ADDR_W   = (ROW_W > COL_W) ? ROW_W : COL_W,
  localparam int unsigned SEG_COLS = COLS / NSEG
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ras_n,
  input  logic              cas_n,
  input  logic              we_n,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout,
  output logic              dout_valid,
  output logic [NSEG-1:0]   seg_busy,
  output logic              seg_conflict
);

  logic [ROW_W-1:0]  row_q;
  logic [COL_W-1:0]  col_q;
  logic              we_q;
  logic [DATA_W-1:0] wdata_q;
  logic              ls_pend;

  logic [ROWS-1:0]           row_lines;
  logic [COLS-1:0]           col_lines;
  logic [NSEG-1:0]           rlclk;
  logic [NSEG-1:0][ROWS-1:0] wl;
  logic [COLS-1:0]           col_act;

  logic [NSEG-1:0] sense, encl, data_ld, data_slot, pre, conflict, we_s;
  logic [DATA_W-1:0] rdata [NSEG];

  rr_addr_latch #(.ROW_W(ROW_W), .COL_W(COL_W), .DATA_W(DATA_W)) u_addr (
    .clk, .rst_n, .ras_n, .cas_n, .we_n, .addr, .din,
    .row_q, .col_q, .we_q, .wdata_q, .ls_pend
  );

  rr_row_decoder #(.ROWS(ROWS)) u_rowdec (
    .row(row_q), .en(ls_pend), .row_lines
  );

  rr_col_decoder #(.COLS(COLS), .NSEG(NSEG)) u_coldec (
    .col(col_q), .en(ls_pend), .col_lines, .rlclk
  );

  rr_row_seg_latch #(.ROWS(ROWS), .NSEG(NSEG)) u_rls (
    .clk, .rst_n, .row_lines, .rlclk, .pre, .wl
  );

  rr_col_dec_latch #(.COLS(COLS), .NSEG(NSEG)) u_cdl (
    .clk, .rst_n, .col_lines, .load(ls_pend), .clr_seg(pre), .q(col_act)
  );

  for (genvar s = 0; s < NSEG; s++) begin : g_seg
    rr_seg_ctrl #(.T_RD(T_RD), .T_CAC(T_CAC), .T_PR(T_PR)) u_ctrl (
      .clk, .rst_n, .start(rlclk[s]), .busy(seg_busy[s]),
      .sense(sense[s]), .encl(encl[s]), .data_ld(data_ld[s]),
      .data_slot(data_slot[s]), .pre(pre[s]), .conflict(conflict[s])
    );

    rr_dram_segment #(.ROWS(ROWS), .SEG_COLS(SEG_COLS), .DATA_W(DATA_W)) u_array (
      .clk, .rst_n, .wl(wl[s]), .col_en(col_act[s*SEG_COLS +: SEG_COLS]),
      .ls(rlclk[s]), .we_in(we_q), .wdata_in(wdata_q),
      .sense(sense[s]), .encl(encl[s]), .pre(pre[s]),
      .we_s(we_s[s]), .rdata(rdata[s])
    );
  end

  assign seg_conflict = |conflict;

  // Output data latch: takes the read data of the segment whose T_cac wait
  // ends, so it is on the bus in that segment's data slot.
  logic [DATA_W-1:0] dsel;
  logic              dsel_rd;
  always_comb begin
    dsel    = '0;
    dsel_rd = 1'b0;
    for (int s = 0; s < NSEG; s++)
      if (data_ld[s]) begin
        dsel    = dsel | rdata[s];
        dsel_rd = dsel_rd | !we_s[s];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= dsel_rd;
      if (dsel_rd) dout <= dsel;
    end
  end

  a_one_data: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(data_ld))
    else $error("two segments deliver data in the same cycle");
  a_data_in_slot: assert property (@(posedge clk) disable iff (!rst_n) dout_valid |-> (|data_slot))
    else $error("read data outside a segment's data slot");

endmodule
