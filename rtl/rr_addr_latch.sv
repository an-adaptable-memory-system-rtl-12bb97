// rr_addr_latch: row address latch and column address latch of the RRDRAM.
//
// The device keeps the usual multiplexed DRAM address bus. In the cycle
// where RAS_n is low the bus carries a row address, which is stored in the
// row address latch at the clock edge; in the cycle where CAS_n is low it
// carries a column address, which is stored in the column address latch.
// Because both are latched at once, the bus is free for the next access in
// the following cycle: this is what lets accesses overlap.
//
// The write enable and the write data are sampled together with the column
// address, as in a conventional DRAM (this design's choice; the document
// describes reads). ls_pend is high for the one cycle after a column was
// latched: the cycle in which the access latches its decoded row into the
// row latch of its segment (LS in the timing chart).
//
// Timing: all outputs are registers, valid the cycle after the strobe.
module rr_addr_latch #(
  parameter int unsigned ROW_W  = 10,
  parameter int unsigned COL_W  = 10,
  parameter int unsigned DATA_W = rr_pkg::DATA_W,
  parameter int unsigned ADDR_W = (ROW_W > COL_W) ? ROW_W : COL_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ras_n,
  input  logic              cas_n,
  input  logic              we_n,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] din,
  output logic [ROW_W-1:0]  row_q,
  output logic [COL_W-1:0]  col_q,
  output logic              we_q,
  output logic [DATA_W-1:0] wdata_q,
  output logic              ls_pend
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_q   <= '0;
      col_q   <= '0;
      we_q    <= 1'b0;
      wdata_q <= '0;
      ls_pend <= 1'b0;
    end else begin
      if (!ras_n) row_q <= addr[ROW_W-1:0];
      if (!cas_n) begin
        col_q   <= addr[COL_W-1:0];
        we_q    <= !we_n;
        wdata_q <= din;
      end
      ls_pend <= !cas_n;
    end
  end

  // The bus carries one address per cycle.
  a_one_strobe: assert property (@(posedge clk) disable iff (!rst_n) !(!ras_n && !cas_n))
    else $error("RAS_n and CAS_n low in the same cycle");

endmodule
