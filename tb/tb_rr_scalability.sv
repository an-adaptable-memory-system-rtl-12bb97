// tb_rr_scalability: the multi-core miss workload on the memory system.
//
// For Np = 10, 20, ..., 100 cores, each core has one cache miss
// outstanding and all Np misses reach the memory together, as in the
// performance model of the design: with a reconfigurable-row memory the Np
// misses cost one full access plus Np transfers, Ta + Np * Tf, instead of
// Np * (Ta + Tf) with one open row per bank.
//
// Run 1: the misses hit Np different rows, spread over the segments (core
//        i in segment i mod 16). All Np data must be back READ_LAT +
//        2 * (Np - 1) cycles after the first access started: one access
//        latency, then one datum every two cycles.
// Run 2: the misses hit random rows and columns. Every datum must be
//        correct; the time taken and the cycles lost to busy segments are
//        reported.
// For each Np the model's scalability (Np * Ts / Tm) is printed for the
// single-open-row memory and for this one, with the measured Ta and Tf
// of the RTL in cycles next to the model's 30 ns and 12.8 ns.
module tb_rr_scalability;
  localparam int READ_LAT = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic        req_valid = 1'b0, req_ready, req_we = 1'b0;
  logic [19:0] req_addr = '0;
  logic [7:0]  req_wdata = '0;
  logic [6:0]  req_id = '0;
  logic        rsp_valid, issue, stall_seg, seg_conflict;
  logic [7:0]  rsp_data;
  logic [6:0]  rsp_id;
  logic [15:0] seg_busy;
  int checks = 0, failures = 0;

  rr_system dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int n_stall = 0;
  always @(posedge clk) if (rst_n && stall_seg) n_stall++;

  logic [7:0] exp_data [128];
  int n_rsp = 0, last_rsp = 0;
  always @(posedge clk) if (rst_n && rsp_valid) begin
    checks++;
    if (rsp_data !== exp_data[rsp_id]) begin
      failures++;
      if (failures < 10) $display("core %0d: data %h expected %h", rsp_id, rsp_data, exp_data[rsp_id]);
    end
    n_rsp++;
    last_rsp = cyc;
  end

  task automatic request(input bit w, input int a, input logic [7:0] d, input int id, output int t);
    req_valid <= 1'b1; req_we <= w; req_addr <= 20'(a); req_wdata <= d; req_id <= 7'(id);
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    t = cyc;
  endtask

  // Model of the paper's performance equations (times in ns).
  function automatic real scal_dram(int np);
    real tp = 0.15, ni = 1.0e9, m = 0.0006, ta = 30.0, tf = 12.8, ts, tm;
    ts = tp * ni + m * ni * (ta + tf);
    tm = tp * ni + np * m * ni * (ta + tf);
    return np * ts / tm;
  endfunction
  function automatic real scal_rr(int np);
    real tp = 0.15, ni = 1.0e9, m = 0.0006, ta = 30.0, tf = 12.8, ts, tm;
    ts = tp * ni + m * ni * (ta + tf);
    tm = tp * ni + m * ni * (ta + np * tf);
    return np * ts / tm;
  endfunction

  int addrs [128];
  int t, t_first, span;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int np = 10; np <= 100; np += 10) begin
      for (int run = 0; run < 2; run++) begin
        // each core's miss address: a fresh row per core
        for (int i = 0; i < np; i++) begin
          int row, col;
          row = (run == 0) ? (i * 37 + np) % 1024 : int'($urandom_range(0, 1023));
          col = (run == 0) ? (i % 16) * 64 + int'($urandom_range(0, 63)) : int'($urandom_range(0, 1023));
          addrs[i] = row * 1024 + col;
        end
        // fill memory: one write per core (later writes to a repeated
        // address win, as in the scoreboard)
        for (int i = 0; i < np; i++) begin
          logic [7:0] d;
          d = 8'($urandom);
          request(1'b1, addrs[i], d, i, t);
          for (int j = 0; j < np; j++) if (addrs[j] == addrs[i]) exp_data[j] = d;
        end
        req_valid <= 1'b0;
        repeat (8) @(posedge clk);
        // all cores miss together
        n_rsp = 0;
        n_stall = 0;
        for (int i = 0; i < np; i++) begin
          request(1'b0, addrs[i], 8'h00, i, t);
          if (i == 0) t_first = t;
        end
        req_valid <= 1'b0;
        repeat (READ_LAT + 2) @(posedge clk);
        span = last_rsp - t_first;
        checks++;
        if (n_rsp != np) failures++;
        if (run == 0) begin
          checks++;
          if (span != READ_LAT + 2 * (np - 1)) begin
            failures++;
            $display("Np=%0d: %0d cycles, expected %0d", np, span, READ_LAT + 2 * (np - 1));
          end
          $display("Np=%3d  spread rows: %4d cycles (Ta=%0d + Np*Tf, Tf=2)  model scalability DRAM %5.2f  RRDRAM %5.2f",
                   np, span, READ_LAT - 2, scal_dram(np), scal_rr(np));
        end else begin
          $display("Np=%3d  random rows: %4d cycles, %0d cycles waiting for a busy segment", np, span, n_stall);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
