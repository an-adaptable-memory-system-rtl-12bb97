// tb_rr_seg_ctrl: checks the timing of one segment's access sequence.
//
// With one-cycle waits (the default) a start in cycle 0 must give sense in
// cycle 1, column enable in 2, data load in 3, data slot and precharge end
// in 4, and idle again in 5. A second instance with T_RD=3, T_CAC=2, T_PR=2
// checks the general offsets. conflict must stay low throughout.
module tb_rr_seg_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start_a = 1'b0, start_b = 1'b0;
  logic busy_a, sense_a, encl_a, ld_a, slot_a, pre_a, conf_a;
  logic busy_b, sense_b, encl_b, ld_b, slot_b, pre_b, conf_b;
  int checks = 0, failures = 0;

  rr_seg_ctrl u_a (.clk, .rst_n, .start(start_a), .busy(busy_a), .sense(sense_a), .encl(encl_a),
                   .data_ld(ld_a), .data_slot(slot_a), .pre(pre_a), .conflict(conf_a));
  rr_seg_ctrl #(.T_RD(3), .T_CAC(2), .T_PR(2)) u_b (
                   .clk, .rst_n, .start(start_b), .busy(busy_b), .sense(sense_b), .encl(encl_b),
                   .data_ld(ld_b), .data_slot(slot_b), .pre(pre_b), .conflict(conf_b));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected strobe vector {busy, sense, encl, data_ld, data_slot, pre} in
  // cycle k after the start cycle (k = 1 is the first cycle after start).
  function automatic logic [5:0] expect_at(int k, int trd, int tcac, int tpr);
    int e_encl = trd + 1, e_cac0 = trd + 2, e_pre0 = trd + 2 + tcac, e_end = trd + 1 + tcac + tpr;
    logic [5:0] v = '0;
    if (k >= 1 && k <= e_end) v[5] = 1'b1;
    if (k == trd)             v[4] = 1'b1;
    if (k == e_encl)          v[3] = 1'b1;
    if (k == e_pre0 - 1)      v[2] = 1'b1;
    if (k == e_pre0)          v[1] = 1'b1;
    if (k == e_end)           v[0] = 1'b1;
    return v;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int rep = 0; rep < 20; rep++) begin
      repeat (int'($urandom_range(1, 3))) @(posedge clk);
      start_a <= 1'b1; start_b <= 1'b1;
      @(posedge clk);
      start_a <= 1'b0; start_b <= 1'b0;
      for (int k = 1; k <= 12; k++) begin
        #1;
        checks++;
        if (conf_a || conf_b) failures++;
        checks++;
        if ({busy_a, sense_a, encl_a, ld_a, slot_a, pre_a} !== expect_at(k, 1, 1, 1)) begin
          failures++;
          if (failures < 10) $display("A cycle %0d: %b", k, {busy_a, sense_a, encl_a, ld_a, slot_a, pre_a});
        end
        checks++;
        if ({busy_b, sense_b, encl_b, ld_b, slot_b, pre_b} !== expect_at(k, 3, 2, 2)) begin
          failures++;
          if (failures < 10) $display("B cycle %0d: %b", k, {busy_b, sense_b, encl_b, ld_b, slot_b, pre_b});
        end
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
