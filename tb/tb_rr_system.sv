// tb_rr_system: end-to-end test of the memory system at its default size
// (1024 x 1024 array of 8-bit columns, 16 row segments).
//
// Eight requesters stand in for processor cores with cache misses. Each
// owns a region of memory, writes into it and reads back, with rows chosen
// at random so that nearly every access hits a different physical row.
// A round-robin pick among the cores that have a request feeds the single
// request port. Checked:
//   - every read returns the data last written (scoreboard per address),
//     carrying the id (core number and sequence) of its request;
//   - every read's data arrives exactly READ_LAT = 6 cycles after the cycle
//     in which its access started;
//   - the four-access example (rows 896, 82, 234, 567 in four segments)
//     delivers its four data in 6 + 3 * 2 = 12 cycles from the first RAS;
// and each mechanism happened at least once: accesses started two cycles
// apart, two segments holding different rows at the same time, a request
// held back by a segment still precharging, reads and writes.
module tb_rr_system;
  localparam int READ_LAT = 6, NCORE = 8;
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- mechanism counters
  int n_b2b = 0, n_multi_row = 0, n_stall = 0, n_rd = 0, n_wr = 0, last_issue = -10;

  function automatic int row_of(logic [1023:0] wl);
    for (int r = 0; r < 1024; r++) if (wl[r]) return r;
    return -1;
  endfunction

  always @(posedge clk) if (rst_n) begin
    int r0, r1;
    if (issue) begin
      if (cyc - last_issue == 2) n_b2b++;
      last_issue = cyc;
    end
    if (stall_seg) n_stall++;
    if (seg_conflict) begin
      failures++;
      $display("cycle %0d: segment conflict", cyc);
    end
    // two segments with word lines of different rows on at once
    r0 = -1; r1 = -1;
    for (int s = 0; s < 16; s++) begin
      int r;
      r = row_of(dut.u_dram.wl[s]);
      if (r >= 0) begin
        if (r0 < 0) r0 = r;
        else if (r != r0) r1 = r;
      end
    end
    if (r0 >= 0 && r1 >= 0) n_multi_row++;
  end

  // ---------------- scoreboard
  typedef struct { int id; int start; logic [7:0] data; bit known; } exp_t;
  exp_t exp_q [$];
  logic [7:0] ref_mem [int];
  int ex_t0 = -1, ex_last = -1, n_rsp = 0;

  always @(posedge clk) if (rst_n && rsp_valid) begin
    exp_t e;
    n_rsp++;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("cycle %0d: unexpected response", cyc);
    end else begin
      e = exp_q.pop_front();
      if (int'(rsp_id) != e.id || (e.known && rsp_data !== e.data)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: id %0d data %h, expected id %0d data %h",
                                    cyc, rsp_id, rsp_data, e.id, e.data);
      end
      checks++;
      if (cyc - e.start != READ_LAT) begin
        failures++;
        if (failures < 10) $display("cycle %0d: read latency %0d", cyc, cyc - e.start);
      end
      ex_last = cyc;
    end
  end

  // ---------------- request port driver
  task automatic request(input bit w, input int a, input logic [7:0] d, input int id);
    req_valid <= 1'b1; req_we <= w; req_addr <= 20'(a); req_wdata <= d; req_id <= 7'(id);
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    if (w) begin
      ref_mem[a] = d;
      n_wr++;
    end else begin
      exp_q.push_back('{id, cyc, ref_mem.exists(a) ? ref_mem[a] : 8'h00, ref_mem.exists(a)});
      n_rd++;
    end
  endtask

  // per-core state
  int core_addrs [NCORE][$];
  int core_seq [NCORE];

  int ex_row [4] = '{896, 82, 234, 567};
  int ex_col [4] = '{48, 64 + 58, 128 + 12, 192 + 23};
  int rr_ptr = 0, c, a, row, col;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // ----- four-access example: write, then read back to back
    for (int i = 0; i < 4; i++) request(1'b1, ex_row[i] * 1024 + ex_col[i], 8'(8'hC0 + i), 0);
    for (int i = 0; i < 4; i++) begin
      request(1'b0, ex_row[i] * 1024 + ex_col[i], 8'h00, i);
      if (i == 0) ex_t0 = cyc;
    end
    req_valid <= 1'b0;
    repeat (READ_LAT + 2) @(posedge clk);
    checks++;
    if (ex_last - ex_t0 != 12) begin
      failures++;
      $display("four accesses took %0d cycles", ex_last - ex_t0);
    end
    // ----- eight cores, random rows, round-robin request port
    foreach (core_seq[i]) core_seq[i] = 0;
    for (int n = 0; n < 6000; n++) begin
      c = rr_ptr;
      rr_ptr = (rr_ptr + 1) % NCORE;
      if (core_addrs[c].size() > 2 && $urandom_range(0, 1) == 1) begin
        a = core_addrs[c][$urandom_range(0, core_addrs[c].size() - 1)];
        request(1'b0, a, 8'h00, c * 16 + core_seq[c] % 16);
      end else begin
        row = int'($urandom_range(0, 1023));
        // core c works in columns of segments 2c and 2c+1, at random offsets
        col = (2 * c + int'($urandom_range(0, 1))) * 64 + int'($urandom_range(0, 63));
        // now and then a core touches another core's segment, to force waits
        if ($urandom_range(0, 5) == 0) col = int'($urandom_range(0, 1023));
        a = row * 1024 + col;
        core_addrs[c].push_back(a);
        request(1'b1, a, 8'($urandom), c * 16 + core_seq[c] % 16);
      end
      core_seq[c]++;
      if ($urandom_range(0, 15) == 0) begin
        req_valid <= 1'b0;
        @(posedge clk);
      end
    end
    req_valid <= 1'b0;
    repeat (READ_LAT + 4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("reads %0d writes %0d responses %0d", n_rd, n_wr, n_rsp);
    $display("mechanisms: back-to-back starts %0d, cycles with different rows open %0d, segment waits %0d",
             n_b2b, n_multi_row, n_stall);
    checks++; if (n_b2b == 0)       failures++;
    checks++; if (n_multi_row == 0) failures++;
    checks++; if (n_stall == 0)     failures++;
    checks++; if (n_rd == 0 || n_wr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
