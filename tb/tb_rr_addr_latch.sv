// tb_rr_addr_latch: checks the row and column address latches.
//
// Drives random RAS / CAS / idle cycles on the multiplexed bus and compares
// the latched row, column, write flag and write data, and the one-cycle LS
// flag, against a model kept in the testbench.
module tb_rr_addr_latch;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ras_n = 1'b1, cas_n = 1'b1, we_n = 1'b1;
  logic [9:0] addr = '0;
  logic [7:0] din = '0;
  logic [9:0] row_q, col_q;
  logic       we_q, ls_pend;
  logic [7:0] wdata_q;
  int checks = 0, failures = 0;

  rr_addr_latch dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [9:0] e_row = '0, e_col = '0;
  logic       e_we = 1'b0, e_ls = 1'b0;
  logic [7:0] e_wd = '0;
  int kind;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      kind = int'($urandom_range(0, 2));
      ras_n <= (kind != 0);
      cas_n <= (kind != 1);
      we_n  <= 1'($urandom);
      addr  <= 10'($urandom);
      din   <= 8'($urandom);
      @(posedge clk);
      // model update for what was sampled at this edge
      if (!ras_n) e_row = addr;
      if (!cas_n) begin e_col = addr; e_we = !we_n; e_wd = din; end
      e_ls = !cas_n;
      #1;
      checks++;
      if (row_q !== e_row || col_q !== e_col || we_q !== e_we || wdata_q !== e_wd || ls_pend !== e_ls) begin
        failures++;
        if (failures < 10)
          $display("mismatch at %0d: row %h/%h col %h/%h we %b/%b wd %h/%h ls %b/%b", i,
                   row_q, e_row, col_q, e_col, we_q, e_we, wdata_q, e_wd, ls_pend, e_ls);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
