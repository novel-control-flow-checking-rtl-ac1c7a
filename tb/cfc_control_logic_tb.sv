// cfc_control_logic_tb: the YACCA check may only fire while enabled and while the
// Set/Test counts match, and the error must then stick until clear. Random
// one-hot annotations and predecessor masks are applied; the expected sticky error
// is kept in the testbench from its own evaluation of |(id & ~mask).
module cfc_control_logic_tb;
  localparam int VW = 200;
  logic clk = 0, rst_n = 0, clear = 0, enable = 0, match = 0;
  logic [VW-1:0] id, mask;
  logic [4:0] size_sel = 0;
  logic cfe;
  logic exp_cfe = 0;
  int checks = 0, failures = 0, fires = 0;

  cfc_control_logic #(.SLICE_W(8), .N_SLICES(25), .SEL_W(5)) dut (
    .clk, .rst_n, .clear, .enable, .match, .id, .mask, .size_sel, .cfe);
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    id = '0; mask = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 8000; t++) begin
      automatic int node;
      automatic logic bad;
      @(negedge clk);
      node = $urandom_range(0, VW-1);
      id = '0; id[node] = 1'b1;
      mask = '0;
      for (int k = 0; k < 4; k++) mask[$urandom_range(0, VW-1)] = 1'b1;
      if ($urandom_range(0, 3) != 0) mask[node] = 1'b1;
      enable = ($urandom_range(0, 7) != 0);
      match  = $urandom_range(0, 1);
      clear  = ($urandom_range(0, 9) == 0);
      bad = 1'b0;
      for (int k = 0; k < VW; k++) if (id[k] && !mask[k]) bad = 1'b1;
      @(posedge clk);
      if (clear) exp_cfe = 0;
      else if (enable && match && bad) begin exp_cfe = 1; fires++; end
      #1;
      checks++;
      if (cfe !== exp_cfe) begin
        failures++;
        if (failures < 5) $display("FAIL t=%0d cfe=%b exp=%b", t, cfe, exp_cfe);
      end
    end
    if (fires == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
