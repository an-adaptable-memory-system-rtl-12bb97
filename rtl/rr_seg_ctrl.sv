// rr_seg_ctrl: access sequencer of one row segment of the RRDRAM.
//
// Each segment runs its own access through the steps of the pipelined
// operation, so up to NSEG accesses to different rows overlap, each a few
// steps behind the previous one. start is the segment's RlClk: the decoded
// row is latched into the segment in that cycle (LS). The segment then
//
//   ACT   T_RD cycles  word line on, row being sensed; sense at the last one
//   ENCL  1 cycle      column enabled onto the bit line
//   CAC   T_CAC cycles wait T_cac; data_ld at the last one (data to the
//                      output latch)
//   PRE   T_PR cycles  data valid on the bus in the first one (data_slot),
//                      segment precharged; pre at the last one clears the
//                      segment's row latch, column bits and sense amps
//
// and is idle again. start while busy is a protocol error: it is flagged
// on conflict and by an assertion, and ignored. T_CAC must be at least 1.
//
// The order of the steps and the precharge right after the data follow the
// document; one sequencer per segment and the cycle counts are this
// design's reading of its timing chart.
module rr_seg_ctrl #(
  parameter int unsigned T_RD  = rr_pkg::T_RD_CYC,
  parameter int unsigned T_CAC = rr_pkg::T_CAC_CYC,
  parameter int unsigned T_PR  = rr_pkg::T_PR_CYC
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic busy,
  output logic sense,
  output logic encl,
  output logic data_ld,
  output logic data_slot,
  output logic pre,
  output logic conflict
);

  typedef enum logic [2:0] {S_IDLE, S_ACT, S_ENCL, S_CAC, S_PRE} seg_state_e;

  localparam int unsigned MAXC = (T_RD > T_CAC) ? ((T_RD > T_PR) ? T_RD : T_PR)
                                               : ((T_CAC > T_PR) ? T_CAC : T_PR);
  localparam int unsigned CNT_W = $clog2(MAXC + 1);

  seg_state_e       state;
  logic [CNT_W-1:0] cnt;     // cycles left in the current step, minus one

  if (T_RD < 1 || T_CAC < 1 || T_PR < 1) begin : g_bad_timing
    $error("rr_seg_ctrl: T_RD, T_CAC and T_PR must each be at least 1");
  end

  logic last;
  assign last = (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin state <= S_ACT;  cnt <= CNT_W'(T_RD - 1);  end
        S_ACT:  if (last)  begin state <= S_ENCL; cnt <= '0;                end
                else       cnt <= cnt - 1'b1;
        S_ENCL:            begin state <= S_CAC;  cnt <= CNT_W'(T_CAC - 1); end
        S_CAC:  if (last)  begin state <= S_PRE;  cnt <= CNT_W'(T_PR - 1);  end
                else       cnt <= cnt - 1'b1;
        S_PRE:  if (last)  begin state <= S_IDLE; cnt <= '0;                end
                else       cnt <= cnt - 1'b1;
        default:           state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign sense     = (state == S_ACT) && last;
  assign encl      = (state == S_ENCL);
  assign data_ld   = (state == S_CAC) && last;
  assign data_slot = (state == S_PRE) && (cnt == CNT_W'(T_PR - 1));
  assign pre       = (state == S_PRE) && last;
  assign conflict  = start && busy;

  a_no_conflict: assert property (@(posedge clk) disable iff (!rst_n) !conflict)
    else $error("access started on a segment that is still busy");

endmodule
