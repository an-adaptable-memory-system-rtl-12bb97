// rr_dram_segment: one row segment of the RRDRAM cell array, with its
// sense amplifiers and write driver.
//
// The segment holds ROWS x SEG_COLS cells of DATA_W bits (a column of the
// document's array, widened to the device width). Its word lines come from
// the segment's own row latch, so it can have a row open that differs from
// the rows open in the other segments.
//
//   ls     : the access is in its LS cycle; its write enable and write data
//            are stored in the segment's write driver.
//   sense  : end of the T_rd wait; the cells on the active word line are
//            copied into the segment's sense amplifiers.
//   encl   : column enable. The active column (one-hot col_en, the
//            segment's slice of the column decoder latch) is connected to
//            the bit line. A read copies it into rdata; a write puts the
//            stored data into the sense amplifier and the cell.
//   pre    : end of precharge; the sense amplifiers are released (cleared).
//
// The cell array is a plain memory; the analogue behaviour of cells, bit
// lines and sense amplifiers (charge sharing, restore, refresh) is not
// modelled. Timing: all updates at the clock edge where the strobe is high;
// rdata holds its value until the next read.
module rr_dram_segment #(
  parameter int unsigned ROWS     = rr_pkg::ROWS,
  parameter int unsigned SEG_COLS = rr_pkg::COLS / rr_pkg::NSEG,
  parameter int unsigned DATA_W   = rr_pkg::DATA_W,
  localparam int unsigned ROW_W   = $clog2(ROWS),
  localparam int unsigned SC_W    = $clog2(SEG_COLS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [ROWS-1:0]     wl,
  input  logic [SEG_COLS-1:0] col_en,
  input  logic                ls,
  input  logic                we_in,
  input  logic [DATA_W-1:0]   wdata_in,
  input  logic                sense,
  input  logic                encl,
  input  logic                pre,
  output logic                we_s,
  output logic [DATA_W-1:0]   rdata
);

  logic [SEG_COLS-1:0][DATA_W-1:0] cells [ROWS];
  logic [SEG_COLS-1:0][DATA_W-1:0] sa;
  logic                            sa_open;
  logic [DATA_W-1:0]               wdata_s;
  logic [ROW_W-1:0]                ridx;
  logic [SC_W-1:0]                 cidx;

  // Index of the active word line and of the enabled column (both one-hot).
  always_comb begin
    ridx = '0;
    for (int r = 0; r < ROWS; r++)
      if (wl[r]) ridx = ridx | ROW_W'(r);
    cidx = '0;
    for (int c = 0; c < SEG_COLS; c++)
      if (col_en[c]) cidx = cidx | SC_W'(c);
  end

  // Cell array: written through on a write column access.
  always_ff @(posedge clk) begin
    if (encl && we_s) cells[ridx][cidx] <= wdata_s;
  end

  // Sense amplifiers, write driver and read latch.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sa      <= '0;
      sa_open <= 1'b0;
      we_s    <= 1'b0;
      wdata_s <= '0;
      rdata   <= '0;
    end else begin
      if (ls) begin
        we_s    <= we_in;
        wdata_s <= wdata_in;
      end
      if (sense) begin
        sa      <= cells[ridx];
        sa_open <= 1'b1;
      end else if (encl) begin
        if (we_s) sa[cidx] <= wdata_s;
        else      rdata    <= sa[cidx];
      end else if (pre) begin
        sa      <= '0;
        sa_open <= 1'b0;
      end
    end
  end

  a_wl_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(wl))
    else $error("more than one word line active in a segment");
  a_sense_wl: assert property (@(posedge clk) disable iff (!rst_n) sense |-> $onehot(wl))
    else $error("sense without an active word line");
  a_encl_open: assert property (@(posedge clk) disable iff (!rst_n) encl |-> (sa_open && $onehot(col_en)))
    else $error("column enable without an open row or a single column");

endmodule
