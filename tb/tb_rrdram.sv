// tb_rrdram: checks the RRDRAM device at full size from its DRAM bus.
//
// 1. The four-access example: rows 896, 82, 234 and 567, each in its own
//    segment, written and then read back-to-back with a new access every
//    two cycles. Data must appear 6, 8, 10 and 12 cycles after the first
//    read's RAS cycle, with segments holding different rows at once.
// 2. Random traffic: reads and writes to random rows and columns, started
//    every two cycles where the segment allows it, with idle gaps. Every
//    read of a written location must return the model's data exactly
//    READ_LAT cycles after its RAS cycle, and dout_valid must be low in
//    every other cycle.
module tb_rrdram;
  localparam int READ_LAT = 6, GAP = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ras_n = 1'b1, cas_n = 1'b1, we_n = 1'b1;
  logic [9:0] addr = '0;
  logic [7:0] din = '0, dout;
  logic       dout_valid, seg_conflict;
  logic [15:0] seg_busy;
  int checks = 0, failures = 0;

  rrdram dut (.*);

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] model [int];      // key: row*1024 + col
  logic [7:0] exp_data [int];   // key: cycle of valid read data
  bit         exp_check [int];  // data value known
  int         last_ras [16];
  int         max_busy = 0;

  // Data bus monitor.
  always @(posedge clk) if (rst_n) begin
    #1;
    if (dout_valid) begin
      checks++;
      if (!exp_data.exists(cyc)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: unexpected read data", cyc);
      end else if (exp_check[cyc] && dout !== exp_data[cyc]) begin
        failures++;
        if (failures < 10) $display("cycle %0d: read %h expected %h", cyc, dout, exp_data[cyc]);
      end
    end else if (exp_data.exists(cyc)) begin
      checks++;
      failures++;
      if (failures < 10) $display("cycle %0d: read data missing", cyc);
    end
    if ($countones(seg_busy) > max_busy) max_busy = $countones(seg_busy);
    if (seg_conflict) failures++;
  end

  // One access: RAS cycle then CAS cycle. Returns the RAS cycle.
  task automatic access(input int row, input int col, input bit w, input logic [7:0] d,
                        output int t_ras);
    ras_n <= 1'b0; addr <= 10'(row);
    @(posedge clk);
    t_ras = cyc;
    ras_n <= 1'b1; cas_n <= 1'b0; addr <= 10'(col); we_n <= !w; din <= d;
    last_ras[col / 64] = t_ras;
    if (w) model[row * 1024 + col] = d;
    else begin
      exp_data[t_ras + READ_LAT] = model.exists(row * 1024 + col) ? model[row * 1024 + col] : 8'h00;
      exp_check[t_ras + READ_LAT] = model.exists(row * 1024 + col);
    end
    @(posedge clk);
    cas_n <= 1'b1; we_n <= 1'b1; din <= 8'($urandom);
  endtask

  int ex_row [4] = '{896, 82, 234, 567};
  int ex_col [4] = '{48, 64 + 58, 128 + 12, 192 + 23};
  int t0, t, row, col, s, n_rd = 0;
  bit ok;

  initial begin
    foreach (last_ras[i]) last_ras[i] = -100;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // --- four-access example
    for (int i = 0; i < 4; i++) access(ex_row[i], ex_col[i], 1'b1, 8'(8'hA0 + i), t);
    repeat (GAP) @(posedge clk);
    for (int i = 0; i < 4; i++) begin
      access(ex_row[i], ex_col[i], 1'b0, 8'h00, t);
      if (i == 0) t0 = t;
    end
    while (cyc < t0 + READ_LAT + 1) @(posedge clk);
    // segments holding different rows overlapped in time
    checks++;
    if (max_busy < 2) failures++;
    // the fourth datum came 12 cycles after the first RAS
    checks++;
    if (!exp_data.exists(t0 + 12) || exp_data[t0 + 12] !== 8'hA3) failures++;
    while (cyc < t0 + 14) @(posedge clk);
    // --- random traffic
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(0, 7) == 0) @(posedge clk);
      row = int'($urandom_range(0, 1023));
      if ($urandom_range(0, 1) == 1) row = row % 4;
      ok = 0;
      for (int tries = 0; tries < 16 && !ok; tries++) begin
        col = int'($urandom_range(0, 1023));
        if ($urandom_range(0, 1) == 1) col = col % 256;
        s = col / 64;
        ok = (cyc + 1 - last_ras[s] >= GAP);
      end
      if (!ok) continue;
      if (model.num() > 0 && $urandom_range(0, 1) == 1 && $urandom_range(0, 2) != 0) begin
        int key;
        void'(model.first(key));
        for (int k = 0; k < int'($urandom_range(0, 15)); k++) void'(model.next(key));
        row = key / 1024; col = key % 1024; s = col / 64;
        if (cyc + 1 - last_ras[s] < GAP) continue;
        access(row, col, 1'b0, 8'h00, t);
        n_rd++;
      end else begin
        access(row, col, 1'b1, 8'($urandom), t);
      end
    end
    repeat (10) @(posedge clk);
    checks++;
    if (n_rd < 500) begin
      failures++;
      $display("only %0d reads", n_rd);
    end
    $display("reads %0d, most segments busy at once %0d", n_rd, max_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
