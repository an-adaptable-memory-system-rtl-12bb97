// rr_mem_ctrl: memory controller in front of the RRDRAM.
//
// Takes access requests (valid/ready) and drives them onto the device's
// multiplexed address bus: the row address in one cycle (ras_n low), the
// column address with we_n and write data in the next (cas_n low). It does
// not wait for the data of an access before sending the next one, so with a
// request always waiting it starts a new access every two cycles.
//
// The address is split as {row, column}; the column's top bits name the row
// segment. Two accesses to the same segment must have RAS cycles at least
// SEG_GAP = 2 + T_RD + T_CAC + T_PR apart, so that the second finds the
// first one's segment precharged; a request whose segment is still in use
// is held (stall_seg high) while the bus stays idle. Requests are served in
// order. Read data comes back READ_LAT cycles after the RAS cycle; the
// request's id travels alongside in a delay line and is returned with it.
//
// The two-cycle issue and the overlap follow the document; the handshake,
// the in-order stall on a busy segment and the id return are this design's
// choices. The response channel is the device's data bus passed straight
// through, with only the id added from the delay line.
module rr_mem_ctrl #(
  parameter int unsigned ROWS   = rr_pkg::ROWS,
  parameter int unsigned COLS   = rr_pkg::COLS,
  parameter int unsigned NSEG   = rr_pkg::NSEG,
  parameter int unsigned DATA_W = rr_pkg::DATA_W,
  parameter int unsigned ID_W   = 7,
  parameter int unsigned T_RD   = rr_pkg::T_RD_CYC,
  parameter int unsigned T_CAC  = rr_pkg::T_CAC_CYC,
  parameter int unsigned T_PR   = rr_pkg::T_PR_CYC,
  localparam int unsigned ROW_W    = $clog2(ROWS),
  localparam int unsigned COL_W    = $clog2(COLS),
  localparam int unsigned SEG_W    = $clog2(NSEG),
  localparam int unsigned ADDR_W   = (ROW_W > COL_W) ? ROW_W : COL_W,
  localparam int unsigned SEG_GAP  = rr_pkg::seg_reuse_gap(T_RD, T_CAC, T_PR),
  localparam int unsigned READ_LAT = rr_pkg::read_latency(T_RD, T_CAC),
  localparam int unsigned GAP_W    = $clog2(SEG_GAP)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // request side
  input  logic                   req_valid,
  output logic                   req_ready,
  input  logic                   req_we,
  input  logic [ROW_W+COL_W-1:0] req_addr,
  input  logic [DATA_W-1:0]      req_wdata,
  input  logic [ID_W-1:0]        req_id,
  output logic                   rsp_valid,
  output logic [DATA_W-1:0]      rsp_data,
  output logic [ID_W-1:0]        rsp_id,
  // device side
  output logic                   ras_n,
  output logic                   cas_n,
  output logic                   we_n,
  output logic [ADDR_W-1:0]      addr,
  output logic [DATA_W-1:0]      dq_w,
  input  logic [DATA_W-1:0]      dq_r,
  input  logic                   dq_r_valid,
  // status
  output logic                   issue,
  output logic                   stall_seg
);

  // Column half of the accepted request, sent in the next cycle.
  logic              col_phase;
  logic [COL_W-1:0]  col_h;
  logic              we_h;
  logic [DATA_W-1:0] wdata_h;
  logic [ID_W-1:0]   id_h;

  // Cycles until each segment may take a new RAS.
  logic [GAP_W-1:0] seg_wait [NSEG];

  logic [ROW_W-1:0] req_row;
  logic [COL_W-1:0] req_col;
  logic [SEG_W-1:0] req_seg;
  assign req_row = req_addr[ROW_W+COL_W-1:COL_W];
  assign req_col = req_addr[COL_W-1:0];
  assign req_seg = req_col[COL_W-1 -: SEG_W];

  logic seg_free;
  assign seg_free  = (seg_wait[req_seg] == '0);
  assign req_ready = !col_phase && seg_free;
  assign issue     = req_valid && req_ready;
  assign stall_seg = req_valid && !col_phase && !seg_free;

  // Address multiplexer.
  always_comb begin
    ras_n = 1'b1;
    cas_n = 1'b1;
    we_n  = 1'b1;
    addr  = '0;
    dq_w  = '0;
    if (col_phase) begin
      cas_n = 1'b0;
      we_n  = !we_h;
      addr  = ADDR_W'(col_h);
      dq_w  = wdata_h;
    end else if (issue) begin
      ras_n = 1'b0;
      addr  = ADDR_W'(req_row);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_phase <= 1'b0;
      col_h     <= '0;
      we_h      <= 1'b0;
      wdata_h   <= '0;
      id_h      <= '0;
      for (int s = 0; s < NSEG; s++) seg_wait[s] <= '0;
    end else begin
      for (int s = 0; s < NSEG; s++)
        if (seg_wait[s] != '0) seg_wait[s] <= seg_wait[s] - 1'b1;
      if (issue) begin
        col_phase         <= 1'b1;
        col_h             <= req_col;
        we_h              <= req_we;
        wdata_h           <= req_wdata;
        id_h              <= req_id;
        seg_wait[req_seg] <= GAP_W'(SEG_GAP - 1);
      end else begin
        col_phase <= 1'b0;
      end
    end
  end

  // Id delay line, entered in the CAS cycle, READ_LAT-1 cycles to the data.
  localparam int unsigned DL = READ_LAT - 1;
  logic [DL-1:0]   dl_rd;
  logic [ID_W-1:0] dl_id [DL];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dl_rd <= '0;
      for (int i = 0; i < DL; i++) dl_id[i] <= '0;
    end else begin
      dl_rd[0] <= col_phase && !we_h;
      dl_id[0] <= id_h;
      for (int i = 1; i < DL; i++) begin
        dl_rd[i] <= dl_rd[i-1];
        dl_id[i] <= dl_id[i-1];
      end
    end
  end

  assign rsp_valid = dq_r_valid;
  assign rsp_data  = dq_r;
  assign rsp_id    = dl_id[DL-1];

  a_data_expected: assert property (@(posedge clk) disable iff (!rst_n) dq_r_valid == dl_rd[DL-1])
    else $error("read data from the device out of step with the controller");

endmodule
