// tb_rr_row_decoder: checks the row decoder over every row address.
//
// With en high each address must give exactly its own ROW line; with en
// low no line may be active.
module tb_rr_row_decoder;
  localparam int ROWS = 1024;
  logic [9:0]      row;
  logic            en;
  logic [ROWS-1:0] row_lines;
  int checks = 0, failures = 0;

  rr_row_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < ROWS; r++) begin
      row = 10'(r); en = 1'b1; #1;
      checks++;
      if ($countones(row_lines) != 1 || row_lines[r] !== 1'b1) begin
        failures++;
        if (failures < 10) $display("row %0d: lines not one-hot at %0d", r, r);
      end
      en = 1'b0; #1;
      checks++;
      if (row_lines !== '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
