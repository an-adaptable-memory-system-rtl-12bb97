// tb_rr_col_decoder: checks the column and segment decoder over every
// column address: one column line, and the RlClk of segment col / 64.
module tb_rr_col_decoder;
  localparam int COLS = 1024, NSEG = 16;
  logic [9:0]      col;
  logic            en;
  logic [COLS-1:0] col_lines;
  logic [NSEG-1:0] rlclk;
  int checks = 0, failures = 0;

  rr_col_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < COLS; c++) begin
      col = 10'(c); en = 1'b1; #1;
      checks++;
      if ($countones(col_lines) != 1 || col_lines[c] !== 1'b1) failures++;
      checks++;
      if (rlclk !== NSEG'(1) << (c / 64)) begin
        failures++;
        if (failures < 10) $display("col %0d: rlclk %h", c, rlclk);
      end
      en = 1'b0; #1;
      checks++;
      if (col_lines !== '0 || rlclk !== '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
