// tb_rr_dram_segment: checks one row segment (cells, sense amps, write
// driver) at full size: 1024 rows x 64 columns x 8 bits.
//
// Each operation follows the segment's step order: LS (write flag and data
// stored), sense with one word line on, column enable, precharge. Writes go
// to random cells recorded in a model; reads of recorded cells must return
// the model's value, including reads in a later activation of the same row
// and reads of a column just written in the same activation.
module tb_rr_dram_segment;
  localparam int ROWS = 1024, SC = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [ROWS-1:0] wl = '0;
  logic [SC-1:0]   col_en = '0;
  logic            ls = 1'b0, we_in = 1'b0, sense = 1'b0, encl = 1'b0, pre = 1'b0;
  logic [7:0]      wdata_in = '0, rdata;
  logic            we_s;
  int checks = 0, failures = 0;
  logic [7:0] model [int];

  rr_dram_segment dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input int r, input int c, input logic w, input logic [7:0] d);
    ls <= 1'b1; we_in <= w; wdata_in <= d;
    @(posedge clk);
    ls <= 1'b0; wl <= ROWS'(1) << r;
    @(posedge clk);
    sense <= 1'b1;
    @(posedge clk);
    sense <= 1'b0; encl <= 1'b1; col_en <= SC'(1) << c;
    @(posedge clk);
    encl <= 1'b0;
    @(posedge clk);
    pre <= 1'b1;
    @(posedge clk);
    pre <= 1'b0; wl <= '0; col_en <= '0;
  endtask

  int r, c, key, n_rd = 0;
  logic [7:0] d;
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 1500; i++) begin
      if (model.num() == 0 || $urandom_range(0, 2) == 0) begin
        r = int'($urandom_range(0, ROWS - 1));
        // keep a few rows busy so that rows are reused
        if ($urandom_range(0, 1) == 1) r = r % 8;
        c = int'($urandom_range(0, SC - 1));
        d = 8'($urandom);
        access(r, c, 1'b1, d);
        model[r * SC + c] = d;
      end else begin
        void'(model.first(key));
        for (int k = 0; k < int'($urandom_range(0, model.num() - 1)); k++) void'(model.next(key));
        access(key / SC, key % SC, 1'b0, 8'h00);
        checks++;
        n_rd++;
        if (rdata !== model[key]) begin
          failures++;
          if (failures < 10) $display("row %0d col %0d: read %h expected %h", key / SC, key % SC, rdata, model[key]);
        end
      end
    end
    checks++;
    if (n_rd < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
