// cfc_watchdog_tb: random run bursts against a testbench model of the rule
// "error once the counters have been mismatched for `timeout` consecutive cycles".
// The model counts consecutive run cycles; wd_err must rise in exactly the cycle
// after the run burst reaches the timeout, and last_gap must hold the burst length
// (counting the capture cycle) at each capture. timeout = 0 must never trip.
module cfc_watchdog_tb;
  logic clk = 0, rst_n = 0, clear = 0, run = 0, capture = 0;
  logic [15:0] timeout;
  logic wd_err;
  logic [15:0] last_gap;
  int len = 0, exp_gap = 0;
  logic exp_err = 0;
  int checks = 0, failures = 0, trips = 0;

  cfc_watchdog #(.TMO_W(16)) dut (.clk, .rst_n, .clear, .run, .timeout, .capture,
                                  .wd_err, .last_gap);
  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    timeout = 16'd12;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int burst = 0; burst < 600; burst++) begin
      automatic int blen = $urandom_range(1, 20);
      automatic int idle = $urandom_range(1, 3);
      if (burst % 50 == 0) timeout = 16'($urandom_range(0, 18));
      // clear between bursts now and then
      @(negedge clk);
      clear = (exp_err && $urandom_range(0, 1)) || (burst % 50 == 0);
      run = 0; capture = 0;
      @(posedge clk);
      if (clear) begin exp_err = 0; exp_gap = 0; end
      len = 0;
      #1 clear = 0;
      for (int c = 0; c < blen; c++) begin
        @(negedge clk);
        run = 1;
        capture = (c == blen - 1);
        @(posedge clk);
        len++;
        if (timeout != 0 && len >= int'(timeout)) exp_err = 1;
        if (capture) exp_gap = len;
        #1;
        checks++;
        if (wd_err !== exp_err || int'(last_gap) != exp_gap) begin
          failures++;
          if (failures < 5) $display("FAIL tmo=%0d len=%0d err=%b/%b gap=%0d/%0d",
                                     timeout, len, wd_err, exp_err, last_gap, exp_gap);
        end
      end
      if (exp_err) trips++;
      @(negedge clk);
      run = 0; capture = 0;
      repeat (idle) @(posedge clk);
    end
    if (trips == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
