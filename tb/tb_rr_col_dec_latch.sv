// tb_rr_col_dec_latch: checks the column decoder latch.
//
// Random loads of one decoded column and random per-segment clears; the
// model ORs loads into the held columns and clears a segment's 64 bits.
module tb_rr_col_dec_latch;
  localparam int COLS = 1024, NSEG = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [COLS-1:0] col_lines = '0, q, model = '0;
  logic            load = 1'b0;
  logic [NSEG-1:0] clr_seg = '0;
  int checks = 0, failures = 0, multi = 0;

  rr_col_dec_latch dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 3000; i++) begin
      col_lines <= COLS'(1) << $urandom_range(0, COLS - 1);
      load      <= 1'($urandom);
      clr_seg   <= ($urandom_range(0, 3) == 0) ? NSEG'(1) << $urandom_range(0, NSEG - 1) : '0;
      @(posedge clk);
      for (int k = 0; k < NSEG; k++)
        if (clr_seg[k]) model[k*64 +: 64] = '0;
      if (load) model = model | col_lines;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("cycle %0d: latch differs", i);
      end
      if ($countones(q) > 1) multi++;
    end
    // the feedback must have kept several columns at once
    checks++;
    if (multi == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
