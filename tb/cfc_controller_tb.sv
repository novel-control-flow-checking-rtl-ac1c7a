// cfc_controller_tb: one controller driven by a software model of a YACCA-hardened
// task. A random control-flow graph of 200 basic blocks is built; every block has
// two successors and its predecessors mask is derived from the graph. The task walks
// the graph: on entry to a block it writes that block's predecessors mask (Test,
// seven words, word 0 last) and then its own one-hot ID (Set). Now and then the
// walk jumps to a block that is not a legal successor, which must raise cfe exactly
// two cycles after the Test write, or it stalls between Set and Test, which must
// raise wd_err once `timeout` cycles have passed. The Set/Test pulses, counts and
// the measured Set-to-Test gap are checked too. Writes to other addresses are mixed
// in and must be ignored.
module cfc_controller_tb;
  import cfc_pkg::*;
  localparam int NB = 200, NW = 7;
  localparam logic [31:0] ANN  = 32'h2000_0000;
  localparam logic [31:0] MASK = 32'h2000_0040;
  localparam int TMO = 40;

  logic clk = 0, rst_n = 0, restart = 0;
  bus_wr_t bus;
  ctrl_cfg_t cfg;
  ctrl_status_t status;

  logic [NB-1:0] pred [NB];
  int succ [NB][2];
  int checks = 0, failures = 0;
  int n_cfe = 0, n_wd = 0, n_ok = 0;
  int cyc = 0, last_set_cyc = 0, last_test_cyc = 0;
  int exp_ann = 0, exp_mask = 0;

  cfc_controller #(.SLICE_W(8), .N_SLICES(25)) dut (.clk, .rst_n, .bus, .cfg, .restart, .status);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // one bus write; the Set/Test pulses must show in the same cycle
  task automatic bus_write(logic [31:0] a, logic [31:0] d);
    @(negedge clk);
    bus.valid = 1'b1; bus.addr = a; bus.wdata = d;
    #1;
    check("set pulse",  status.set_pulse  == (cfg.enable && a == ANN));
    check("test pulse", status.test_pulse == (cfg.enable && a == MASK));
    @(negedge clk);
    bus.valid = 1'b0;
  endtask

  task automatic write_vec(logic [31:0] base, logic [NB-1:0] v);
    logic [NW*32-1:0] p = (NW*32)'(v);
    for (int w = NW - 1; w >= 0; w--) bus_write(base + 32'(4*w), p[w*32 +: 32]);
  endtask

  task automatic noise();
    if ($urandom_range(0, 3) == 0) bus_write(32'h2000_1000 + 32'(4*$urandom_range(0, 15)), $urandom);
  endtask

  task automatic do_restart();
    @(negedge clk); restart = 1'b1;
    @(negedge clk); restart = 1'b0;
    exp_ann = 0; exp_mask = 0;
  endtask

  initial begin
    int cur, nxt;
    logic [NB-1:0] onehot;
    bus = '0;
    cfg = '0;
    cfg.enable = 1'b1; cfg.size_sel = '0;
    cfg.ann_base = ANN; cfg.mask_base = MASK; cfg.timeout = 16'(TMO);
    for (int i = 0; i < NB; i++) pred[i] = '0;
    for (int i = 0; i < NB; i++) begin
      succ[i][0] = (i + 1) % NB;
      succ[i][1] = $urandom_range(0, NB - 1);
      pred[succ[i][0]][i] = 1'b1;
      pred[succ[i][1]][i] = 1'b1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    cur = 0;
    onehot = '0; onehot[cur] = 1'b1;
    write_vec(ANN, onehot); exp_ann++; last_set_cyc = cyc;
    for (int step = 0; step < 600; step++) begin
      automatic int kind = $urandom_range(0, 19);
      automatic logic illegal;
      if (kind == 0) begin
        // stall: Set done, Test never comes in time
        repeat (TMO + 2) @(negedge clk);
        check("watchdog trips", status.wd_err && status.err && !status.cfe);
        n_wd++;
        do_restart();
        check("restart clears", !status.err && status.ann_cnt == 0 && status.mask_cnt == 0);
        cur = $urandom_range(0, NB - 1);
        onehot = '0; onehot[cur] = 1'b1;
        write_vec(ANN, onehot); exp_ann++; last_set_cyc = cyc;
        continue;
      end
      nxt = succ[cur][$urandom_range(0, 1)];
      if (kind == 1) begin
        do nxt = $urandom_range(0, NB - 1); while (pred[nxt][cur]);
      end
      illegal = !pred[nxt][cur];
      noise();
      write_vec(MASK, pred[nxt]); exp_mask++; last_test_cyc = cyc;
      // Test write in cycle T: pulse in T, counts and gap in T+1, cfe in T+2
      check("counts", int'(status.ann_cnt) == exp_ann % 256 && int'(status.mask_cnt) == exp_mask % 256);
      check("gap", int'(status.last_gap) == last_test_cyc - last_set_cyc);
      check("cfe not yet", !status.cfe);
      @(negedge clk);
      check("cfe", status.cfe == illegal);
      check("no timeout", !status.wd_err);
      if (illegal) begin
        n_cfe++;
        do_restart();
      end else n_ok++;
      noise();
      cur = nxt;
      onehot = '0; onehot[cur] = 1'b1;
      write_vec(ANN, onehot); exp_ann++; last_set_cyc = cyc;
    end
    // a disabled controller ignores the task
    cfg.enable = 1'b0;
    do_restart();
    write_vec(MASK, '0);
    check("disabled: no count", status.mask_cnt == 0 && !status.err);
    if (n_cfe == 0 || n_wd == 0 || n_ok == 0) failures++;
    $display("legal=%0d cfe=%0d timeouts=%0d", n_ok, n_cfe, n_wd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
