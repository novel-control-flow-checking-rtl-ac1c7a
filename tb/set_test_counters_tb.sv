// set_test_counters_tb: random Set/Test detections and clears; the two counts and
// the match flag are compared every cycle with counts kept in the testbench.
module set_test_counters_tb;
  logic clk = 0, rst_n = 0, clear = 0, set_det = 0, test_det = 0;
  logic [7:0] ann_cnt, mask_cnt;
  logic match;
  int exp_a = 0, exp_m = 0;
  int checks = 0, failures = 0;

  set_test_counters #(.CNT_W(8)) dut (.clk, .rst_n, .clear, .set_det, .test_det,
                                      .ann_cnt, .mask_cnt, .match);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      set_det  = ($urandom_range(0, 2) == 0);
      test_det = ($urandom_range(0, 2) == 0);
      clear    = ($urandom_range(0, 200) == 0);
      @(posedge clk);
      if (clear) begin exp_a = 0; exp_m = 0; end
      else begin
        if (set_det)  exp_a = (exp_a + 1) % 256;
        if (test_det) exp_m = (exp_m + 1) % 256;
      end
      #1;
      checks++;
      if (int'(ann_cnt) != exp_a || int'(mask_cnt) != exp_m || match !== (exp_a == exp_m)) begin
        failures++;
        if (failures < 5) $display("FAIL a=%0d/%0d m=%0d/%0d", ann_cnt, exp_a, mask_cnt, exp_m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
