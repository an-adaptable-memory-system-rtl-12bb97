// tb_rr_row_seg_latch: checks the row segment latches at full size.
//
// Random cycles load a decoded row into one segment or clear segments; a
// model keeps the row each segment holds (or none) and every word line of
// every segment is compared after each edge.
module tb_rr_row_seg_latch;
  localparam int ROWS = 1024, NSEG = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [ROWS-1:0]           row_lines = '0;
  logic [NSEG-1:0]           rlclk = '0, pre = '0;
  logic [NSEG-1:0][ROWS-1:0] wl;
  int checks = 0, failures = 0;
  int held [NSEG];   // -1: no row

  rr_row_seg_latch dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int r, s;
  initial begin
    foreach (held[i]) held[i] = -1;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 3000; i++) begin
      r = int'($urandom_range(0, ROWS - 1));
      s = int'($urandom_range(0, NSEG - 1));
      row_lines <= '0;
      row_lines[r] <= 1'b1;
      rlclk <= ($urandom_range(0, 1) == 1) ? NSEG'(1) << s : '0;
      pre   <= NSEG'($urandom) & NSEG'($urandom);
      @(posedge clk);
      for (int k = 0; k < NSEG; k++) begin
        if (rlclk[k])    held[k] = r;
        else if (pre[k]) held[k] = -1;
      end
      #1;
      for (int k = 0; k < NSEG; k++) begin
        checks++;
        if ((held[k] < 0 && wl[k] !== '0) ||
            (held[k] >= 0 && ($countones(wl[k]) != 1 || wl[k][held[k]] !== 1'b1))) begin
          failures++;
          if (failures < 10) $display("cycle %0d seg %0d: expected row %0d", i, k, held[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
