// rr_pkg: shared sizes and timing of the reconfigurable-row DRAM (RRDRAM).
//
// The array is 1024 rows by 1024 columns, each physical row cut into 16
// row segments of 64 columns. Every access goes through the same fixed
// sequence of clock cycles, counted from the cycle in which RAS_n is low:
//
//   cycle 0          row address latched            (LR)
//   cycle 1          column address latched          (LC)
//   cycle 2          decoded row latched in the segment's row latch (LS)
//   T_RD cycles      word line of that segment on, row sensed (wait T_rd)
//   1 cycle          column enabled onto the bit line (encl)
//   T_CAC cycles     wait T_cac
//   T_PR cycles      data valid on the bus in the first one; segment precharges
//
// Array sizes follow the document; the one-cycle waits are read from its
// timing chart. The data width of one column is this design's choice.
package rr_pkg;

  localparam int unsigned ROWS     = 1024;  // k, rows of the array
  localparam int unsigned COLS     = 1024;  // columns of a physical row
  localparam int unsigned NSEG     = 16;    // n, row segments per row
  localparam int unsigned DATA_W   = 8;     // bits per column (device width)

  localparam int unsigned T_RD_CYC  = 1;    // row activate wait
  localparam int unsigned T_CAC_CYC = 1;    // column access wait
  localparam int unsigned T_PR_CYC  = 1;    // segment precharge

  // Cycles from the RAS cycle to the cycle with valid read data.
  function automatic int unsigned read_latency(int unsigned t_rd, int unsigned t_cac);
    return 4 + t_rd + t_cac;
  endfunction

  // Smallest distance, in cycles, between the RAS cycles of two accesses to
  // the same segment: the second one's segment latch must find the first
  // one's precharge finished.
  function automatic int unsigned seg_reuse_gap(int unsigned t_rd, int unsigned t_cac,
                                                int unsigned t_pr);
    return 2 + t_rd + t_cac + t_pr;
  endfunction

endpackage
