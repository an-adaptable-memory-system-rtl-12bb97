// tb_rr_mem_ctrl: checks the memory controller against a timing-exact
// model of the device bus kept in the testbench.
//
// The model captures each RAS/CAS pair, stores writes, and returns read
// data READ_LAT cycles after the RAS cycle, as the device does. Checked:
// every RAS is followed by a CAS in the next cycle carrying the same
// request's column, write flag and data; requests to other segments start
// every two cycles; two accesses to one segment have RAS cycles at least
// SEG_GAP apart, and exactly SEG_GAP when the second waits for the first;
// every read returns its own id and the written data, in order.
module tb_rr_mem_ctrl;
  localparam int READ_LAT = 6, SEG_GAP = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic        req_valid = 1'b0, req_ready, req_we = 1'b0;
  logic [19:0] req_addr = '0;
  logic [7:0]  req_wdata = '0;
  logic [6:0]  req_id = '0;
  logic        rsp_valid;
  logic [7:0]  rsp_data;
  logic [6:0]  rsp_id;
  logic        ras_n, cas_n, we_n, issue, stall_seg;
  logic [9:0]  addr;
  logic [7:0]  dq_w, dq_r = '0;
  logic        dq_r_valid = 1'b0;
  int checks = 0, failures = 0;

  rr_mem_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- device bus model
  logic [7:0] mem [int];
  int         last_ras_seg [16];
  int         ras_cyc = -10, prev_ras = -10;
  int         ras_row;
  logic [7:0] rd_pipe [int];
  int n_back2back = 0, n_gap_exact = 0, n_stall = 0;

  initial foreach (last_ras_seg[i]) last_ras_seg[i] = -100;

  always @(posedge clk) if (rst_n) begin
    if (stall_seg) n_stall++;
    if (!ras_n) begin
      prev_ras = ras_cyc;
      ras_cyc  = cyc;
      ras_row  = int'(addr);
      if (!cas_n) failures++;
      if (ras_cyc - prev_ras == 2) n_back2back++;
    end
    if (!cas_n) begin
      int s;
      s = int'(addr) / 64;
      checks++;
      if (ras_cyc != cyc - 1) begin
        failures++;
        $display("cycle %0d: CAS not right after RAS", cyc);
      end
      checks++;
      if (ras_cyc - last_ras_seg[s] < SEG_GAP) begin
        failures++;
        $display("cycle %0d: segment %0d reused after %0d cycles", cyc, s, ras_cyc - last_ras_seg[s]);
      end
      if (ras_cyc - last_ras_seg[s] == SEG_GAP) n_gap_exact++;
      last_ras_seg[s] = ras_cyc;
      if (!we_n) mem[ras_row * 1024 + int'(addr)] = dq_w;
      else rd_pipe[ras_cyc + READ_LAT] = mem.exists(ras_row * 1024 + int'(addr)) ?
                                         mem[ras_row * 1024 + int'(addr)] : 8'hEE;
    end
    dq_r_valid <= rd_pipe.exists(cyc + 1);
    dq_r       <= rd_pipe.exists(cyc + 1) ? rd_pipe[cyc + 1] : 8'h00;
  end

  // ---------------- requester and scoreboard
  typedef struct { int id; logic [7:0] data; } exp_t;
  exp_t exp_q [$];
  logic [7:0] ref_mem [int];

  always @(posedge clk) if (rst_n && rsp_valid) begin
    exp_t e;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("unexpected response");
    end else begin
      e = exp_q.pop_front();
      if (int'(rsp_id) != e.id || rsp_data !== e.data) begin
        failures++;
        if (failures < 10) $display("resp id %0d data %h, expected id %0d data %h", rsp_id, rsp_data, e.id, e.data);
      end
    end
  end

  task automatic request(input bit w, input int a, input logic [7:0] d, input int id);
    req_valid <= 1'b1; req_we <= w; req_addr <= 20'(a); req_wdata <= d; req_id <= 7'(id);
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    if (w) ref_mem[a] = d;
    else exp_q.push_back('{id, ref_mem.exists(a) ? ref_mem[a] : 8'hEE});
  endtask

  int a, n_rd = 0;
  int addrs [$];
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // writes then reads to four segments, back to back
    for (int i = 0; i < 4; i++) begin
      a = (i * 300 + 17) * 1024 + i * 64 + 5;
      addrs.push_back(a);
      request(1'b1, a, 8'(8'h10 + i), 0);
    end
    foreach (addrs[i]) request(1'b0, addrs[i], 8'h00, i);
    // same segment twice in a row: the second must wait
    request(1'b0, addrs[0], 8'h00, 9);
    request(1'b0, addrs[0], 8'h00, 10);
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      if ($urandom_range(0, 1) == 1 && addrs.size() > 0) begin
        a = addrs[$urandom_range(0, addrs.size() - 1)];
        request(1'b0, a, 8'h00, i % 128);
        n_rd++;
      end else begin
        a = int'($urandom_range(0, 32'hFFFFF));
        if ($urandom_range(0, 1) == 1) a = a & 32'hF_C0FF;
        addrs.push_back(a);
        request(1'b1, a, 8'($urandom), 0);
      end
      if ($urandom_range(0, 9) == 0) begin
        req_valid <= 1'b0;
        repeat ($urandom_range(1, 4)) @(posedge clk);
      end
    end
    req_valid <= 1'b0;
    repeat (12) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    checks++;
    if (n_back2back < 100 || n_gap_exact < 1 || n_stall < 1) failures++;
    $display("back-to-back %0d, exact segment gap %0d, stall cycles %0d, reads %0d",
             n_back2back, n_gap_exact, n_stall, n_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
