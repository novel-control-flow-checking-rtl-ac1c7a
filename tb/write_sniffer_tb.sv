// write_sniffer_tb: checks capture and commit of a 200-bit vector written as seven
// 32-bit words. The testbench keeps its own copy of the staged words and of the
// visible vector, which must change only, and all at once, on a word-0 write; each
// bus write is checked one cycle later, and commit must be high, in the cycle of the
// write, exactly for word-0 writes. Writes outside the window, unaligned ones and idle cycles
// (valid low) must change nothing; clear must empty the vector.
module write_sniffer_tb;
  import cfc_pkg::*;
  localparam int VW = 200, NW = 7;
  localparam logic [31:0] BASE = 32'h2000_0100;
  logic clk = 0, rst_n = 0, clear = 0;
  bus_wr_t bus;
  logic [VW-1:0] vec;
  logic commit;
  logic [NW*32-1:0] model, staged;
  int checks = 0, failures = 0, commits = 0;

  write_sniffer #(.VEC_W(VW)) dut (.clk, .rst_n, .clear, .bus, .base(BASE), .vec, .commit);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic exp_commit);
    checks++;
    if (vec !== model[VW-1:0] || commit !== exp_commit) begin
      failures++;
      if (failures < 5) $display("FAIL t=%0t commit=%b exp=%b vec ok=%b", $time, commit, exp_commit, vec === model[VW-1:0]);
    end
  endtask

  initial begin
    bus = '0; model = '0; staged = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      automatic int kind = $urandom_range(0, 9);
      automatic logic exp_commit = 1'b0;
      @(negedge clk);
      bus.valid = 1'b1;
      bus.wdata = $urandom;
      if (kind < 6) begin        // inside the window
        automatic int w = $urandom_range(0, NW-1);
        bus.addr = BASE + 32'(4*w);
        if (w == 0) model = {staged[NW*32-1:32], bus.wdata};
        else staged[w*32 +: 32] = bus.wdata;
        exp_commit = (w == 0);
      end else if (kind == 6) begin  // just outside
        bus.addr = $urandom_range(0, 1) ? BASE - 4 : BASE + 32'(4*NW);
      end else if (kind == 7) begin  // unaligned
        bus.addr = BASE + 32'($urandom_range(1, 3));
      end else if (kind == 8) begin  // no write
        bus.valid = 1'b0;
        bus.addr = BASE;
      end else begin                 // clear
        bus.valid = 1'b0;
        clear = 1'b1;
        model = '0;
        staged = '0;
      end
      #1;
      checks++;
      if (commit !== exp_commit) begin
        failures++;
        if (failures < 5) $display("FAIL commit=%b exp=%b", commit, exp_commit);
      end
      @(posedge clk);
      #1;
      bus.valid = 1'b0;
      clear = 1'b0;
      if (exp_commit) commits++;
      #1;
      chk(1'b0);
    end
    if (commits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
