// rr_system: memory system of a multi-core built on the RRDRAM.
//
// The processors' cache misses arrive as requests at the memory
// controller, which overlaps them on one RRDRAM device: misses to
// different row segments are served one every two cycles even when they
// hit different physical rows, with READ_LAT cycles from the start of an
// access to its data. The processors and their caches are outside this
// module; their request and response signals are its ports.
//
// Ports: req_* is a valid/ready request channel (address = {row, column},
// write flag, write data, id); rsp_* returns read data with the id of the
// request, one cycle per read. issue pulses when an access starts,
// stall_seg while the next request waits for its segment to finish
// precharging, seg_busy shows the segments holding an access.
module rr_system #(
  parameter int unsigned ROWS   = rr_pkg::ROWS,
  parameter int unsigned COLS   = rr_pkg::COLS,
  parameter int unsigned NSEG   = rr_pkg::NSEG,
  parameter int unsigned DATA_W = rr_pkg::DATA_W,
  parameter int unsigned ID_W   = 7,
  parameter int unsigned T_RD   = rr_pkg::T_RD_CYC,
  parameter int unsigned T_CAC  = rr_pkg::T_CAC_CYC,
  parameter int unsigned T_PR   = rr_pkg::T_PR_CYC,
  localparam int unsigned ROW_W  = $clog2(ROWS),
  localparam int unsigned COL_W  = $clog2(COLS),
  localparam int unsigned ADDR_W = (ROW_W > COL_W) ? ROW_W : COL_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   req_valid,
  output logic                   req_ready,
  input  logic                   req_we,
  input  logic [ROW_W+COL_W-1:0] req_addr,
  input  logic [DATA_W-1:0]      req_wdata,
  input  logic [ID_W-1:0]        req_id,
  output logic                   rsp_valid,
  output logic [DATA_W-1:0]      rsp_data,
  output logic [ID_W-1:0]        rsp_id,
  output logic                   issue,
  output logic                   stall_seg,
  output logic [NSEG-1:0]        seg_busy,
  output logic                   seg_conflict
);

  logic              ras_n, cas_n, we_n, dq_r_valid;
  logic [ADDR_W-1:0] addr;
  logic [DATA_W-1:0] dq_w, dq_r;

  rr_mem_ctrl #(
    .ROWS(ROWS), .COLS(COLS), .NSEG(NSEG), .DATA_W(DATA_W), .ID_W(ID_W),
    .T_RD(T_RD), .T_CAC(T_CAC), .T_PR(T_PR)
  ) u_ctrl (
    .clk, .rst_n, .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .req_id,
    .rsp_valid, .rsp_data, .rsp_id,
    .ras_n, .cas_n, .we_n, .addr, .dq_w, .dq_r, .dq_r_valid,
    .issue, .stall_seg
  );

  rrdram #(
    .ROWS(ROWS), .COLS(COLS), .NSEG(NSEG), .DATA_W(DATA_W),
    .T_RD(T_RD), .T_CAC(T_CAC), .T_PR(T_PR)
  ) u_dram (
    .clk, .rst_n, .ras_n, .cas_n, .we_n, .addr, .din(dq_w),
    .dout(dq_r), .dout_valid(dq_r_valid), .seg_busy, .seg_conflict
  );

endmodule
