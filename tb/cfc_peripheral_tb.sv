// cfc_peripheral_tb: end-to-end test of the peripheral at its default size (four
// controllers, 8 x 25 replicas = 200 basic blocks), also used as the full-size test.
//
// Software models of four YACCA-hardened tasks share the one snooped write bus:
//   task A: 200 blocks on controller 0 (fixed, all 25 replicas, 7-word vectors)
//   task B:  16 blocks on controller 1 (fixed, 2 replicas, 1-word vectors)
//   tasks C and D: on controller 2 (dynamic, re-programmed at each context change,
//   C -> D -> C -> D -> C; a resumed task switched out between Set and Test gets
//   its annotation re-written by the scheduler model, except once, which must be
//   reported as an error)
//   controller 3 is left disabled while a task writes to its addresses.
// Every task's graph gives block i the successors (i+1) mod n and (7i+3) mod n; the
// predecessors mask of a block is derived from that rule. Each step of a task writes
// the predecessors mask of the block entered (Test) and then its one-hot ID (Set),
// upper words first, word 0 last. The testbench checks, for every bus write, the
// Set/Test pulse of every controller; after a Test, that err rises exactly two
// cycles after the write when the jump was illegal and stays low otherwise; the
// watchdog error after a stall; Set/Test counts and errors read back over APB; the
// interrupt; that LOCK protects the fixed controllers; and that a re-programmed
// dynamic controller follows its new task only. Each mechanism is counted and one
// that never happened counts as a failure.
module cfc_peripheral_tb;
  import cfc_pkg::*;
  localparam int NC = 4;
  localparam int TMO = 300;

  logic clk = 0, rst_n = 0;
  logic bus_valid = 0;
  logic [31:0] bus_addr = 0, bus_wdata = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [11:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  logic pready;
  logic [NC-1:0] err, set_pulse, test_pulse;
  logic irq;

  cfc_peripheral dut (
    .clk, .rst_n, .bus_valid, .bus_addr, .bus_wdata,
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready,
    .err, .set_pulse, .test_pulse, .irq);

  always #5 clk = ~clk;

  // ---- testbench copy of the controller settings and of the expected state
  logic [31:0] m_ann [NC], m_mask [NC];
  logic        m_en [NC];
  int          m_set [NC], m_test [NC];
  logic        m_err [NC];

  // ---- tasks of the software model: 0=A 1=B 2=C 3=D 4=E(uses controller 3's addresses)
  localparam int NT = 5;
  int          t_nb   [NT] = '{200, 16, 64, 40, 8};
  logic [31:0] t_ann  [NT] = '{32'h2000_0000, 32'h2000_0100, 32'h2000_0200, 32'h2000_0300, 32'h2000_0400};
  logic [31:0] t_mask [NT] = '{32'h2000_0040, 32'h2000_0140, 32'h2000_0240, 32'h2000_0340, 32'h2000_0440};
  int          t_cur  [NT];
  int          t_ctrl [NT] = '{0, 1, 2, 2, 3};

  int checks = 0, failures = 0;
  int n_set = 0, n_test = 0, n_multi = 0, n_single = 0, n_legal = 0, n_cfe = 0;
  int n_wd = 0, n_irq = 0, n_lock = 0, n_ctx = 0, n_restart = 0, n_ignored = 0, n_resume = 0, n_unrestored = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- APB
  task automatic apb_write(logic [11:0] a, logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    @(negedge clk); psel = 0; penable = 0; pwrite = 0;
  endtask
  task automatic apb_read(logic [11:0] a, output logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge clk); penable = 1; #1 d = prdata;
    @(negedge clk); psel = 0; penable = 0;
  endtask
  function automatic logic [11:0] ra(int c, logic [2:0] r);
    return {1'b0, 6'(c), r, 2'b00};
  endfunction

  task automatic program_ctrl(int c, int t, logic fixed, int sel);
    apb_write(ra(c, REG_ANN_BASE), t_ann[t]);
    apb_write(ra(c, REG_MASK_BASE), t_mask[t]);
    apb_write(ra(c, REG_TIMEOUT), 32'(TMO));
    apb_write(ra(c, REG_CTRL), {19'd0, 5'(sel), 6'd0, fixed, 1'b1} | 32'h4);
    m_ann[c] = t_ann[t]; m_mask[c] = t_mask[t]; m_en[c] = 1'b1;
    m_set[c] = 0; m_test[c] = 0; m_err[c] = 1'b0;
  endtask

  task automatic restart_ctrl(int c);
    logic [31:0] d;
    apb_read(ra(c, REG_CTRL), d);
    apb_write(ra(c, REG_CTRL), d | 32'h4);
    m_set[c] = 0; m_test[c] = 0; m_err[c] = 1'b0;
    n_restart++;
    @(negedge clk);
    check("restart clears err", !err[c]);
  endtask

  // ---- snooped bus write, with the expected pulse of every controller
  task automatic bus_write(logic [31:0] a, logic [31:0] d);
    @(negedge clk);
    bus_valid = 1; bus_addr = a; bus_wdata = d;
    #1;
    for (int c = 0; c < NC; c++) begin
      logic es = m_en[c] && a == m_ann[c];
      logic et = m_en[c] && a == m_mask[c];
      check("set pulse", set_pulse[c] == es);
      check("test pulse", test_pulse[c] == et);
      if (es) begin m_set[c]++; n_set++; end
      if (et) begin m_test[c]++; n_test++; end
    end
    @(negedge clk);
    bus_valid = 0;
  endtask

  function automatic logic [255:0] pred_of(int t, int j);
    logic [255:0] p = '0;
    for (int i = 0; i < t_nb[t]; i++)
      if ((i + 1) % t_nb[t] == j || (7 * i + 3) % t_nb[t] == j) p[i] = 1'b1;
    return p;
  endfunction

  task automatic write_vec(int t, logic [31:0] base, logic [255:0] v);
    int nw = (t_nb[t] + 31) / 32;
    if (nw > 1) n_multi++; else n_single++;
    for (int w = nw - 1; w >= 0; w--) bus_write(base + 32'(4*w), v[w*32 +: 32]);
  endtask

  task automatic set_id(int t, int node);
    logic [255:0] v = '0;
    v[node] = 1'b1;
    write_vec(t, t_ann[t], v);
    t_cur[t] = node;
  endtask

  // one step: Test for the entered block, then Set; optionally an illegal jump
  task automatic step(int t, logic illegal);
    int c = t_ctrl[t];
    int nb = t_nb[t];
    int cur = t_cur[t];
    int nxt = ($urandom_range(0, 1) == 0) ? (cur + 1) % nb : (7 * cur + 3) % nb;
    logic [255:0] p;
    logic bad;
    if (illegal) begin
      do nxt = $urandom_range(0, nb - 1); while (pred_of(t, nxt)[cur]);
    end
    p = pred_of(t, nxt);
    bad = !p[cur];
    write_vec(t, t_mask[t], p);
    // write in cycle T (just ended): vector and counts in T+1, err in T+2
    if (m_en[c]) begin
      check("no early err", err[c] == m_err[c]);
      @(negedge clk);
      if (bad) begin
        check("cfe raised", err[c]);
        m_err[c] = 1'b1;
        n_cfe++;
      end else begin
        check("legal passes", err[c] == m_err[c]);
        n_legal++;
      end
    end
    set_id(t, nxt);
  endtask

  task automatic check_counts(int c);
    logic [31:0] d;
    apb_read(ra(c, REG_STATUS), d);
    check("set count",  int'(d[15:8])  == m_set[c] % 256);
    check("test count", int'(d[23:16]) == m_test[c] % 256);
    check("err bit",    d[0] == m_err[c]);
  endtask

  initial begin
    logic [31:0] d;
    for (int c = 0; c < NC; c++) begin
      m_ann[c] = '1; m_mask[c] = '1; m_en[c] = 0; m_set[c] = 0; m_test[c] = 0; m_err[c] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    apb_read({1'b1, 6'd0, GREG_INFO, 2'b00}, d);
    check("info", d == {8'd0, 8'd25, 8'd8, 8'd4});
    // ---- configuration: A and B on fixed controllers, C on the dynamic one
    program_ctrl(0, 0, 1'b1, 25);
    program_ctrl(1, 1, 1'b1, 2);
    program_ctrl(2, 2, 1'b0, 8);
    apb_write({1'b1, 6'd0, GREG_CTRL, 2'b00}, 32'h3);  // LOCK, IRQ_EN
    // LOCK: fixed controller 0 refuses a new annotation address
    apb_write(ra(0, REG_ANN_BASE), 32'h3000_0000);
    apb_read(ra(0, REG_ANN_BASE), d);
    check("lock protects", d == t_ann[0]);
    if (d == t_ann[0]) n_lock++;
    // ---- tasks start
    set_id(0, 0); set_id(1, 0); set_id(2, 0);
    // ---- phase 1: interleaved legal flows
    for (int s = 0; s < 60; s++) begin
      step(0, 1'b0); step(1, 1'b0); step(2, 1'b0);
    end
    for (int c = 0; c < 3; c++) check_counts(c);
    check("no irq", !irq);
    // ---- phase 2: illegal jumps, one per controller, each followed by restart
    for (int t = 0; t < 3; t++) begin
      step(t, 1'b1);
      check("irq", irq);
      if (irq) n_irq++;
      check_counts(t_ctrl[t]);
      restart_ctrl(t_ctrl[t]);
      set_id(t, t_cur[t]);
      step(t, 1'b0);
    end
    // ---- phase 3: task B stalls between Set and Test while A keeps running
    for (int s = 0; s < 30 && !err[1]; s++) step(0, 1'b0);
    check("watchdog", err[1] && !err[0]);
    apb_read(ra(1, REG_STATUS), d);
    check("watchdog bit", d[2] && !d[1]);
    if (err[1]) n_wd++;
    restart_ctrl(1);
    set_id(1, 0);
    step(1, 1'b0);
    // ---- phase 4: context change on the dynamic controller, C -> D
    program_ctrl(2, 3, 1'b0, 5);
    n_ctx++;
    set_id(3, 0);
    for (int s = 0; s < 20; s++) begin
      step(3, 1'b0);
      if (s % 4 == 0) begin
        // the preempted task C writes to its old addresses: no longer watched
        set_id(2, t_cur[2]);
      end
    end
    check_counts(2);
    step(3, 1'b1);
    check_counts(2);
    // ---- phase 4b: back to task C; it was switched out between a Set and its
    // Test, so the scheduler re-writes C's annotation after the restart
    apb_read(ra(2, REG_STATUS), d);
    program_ctrl(2, 2, 1'b0, 8);
    n_ctx++;
    set_id(2, t_cur[2]);
    n_resume++;
    for (int s = 0; s < 20; s++) begin step(2, 1'b0); step(0, 1'b0); step(1, 1'b0); end
    check_counts(2);
    // and to D, switched out between a Set and its Test as well
    program_ctrl(2, 3, 1'b0, 5);
    n_ctx++;
    set_id(3, t_cur[3]);
    for (int s = 0; s < 10; s++) begin step(3, 1'b0); step(0, 1'b0); step(1, 1'b0); end
    check_counts(2);
    // a resume that skips the annotation re-write pairs the Test with the task's
    // own next Set and is reported as an error, as documented
    program_ctrl(2, 2, 1'b0, 8);
    n_ctx++;
    step(2, 1'b0);
    repeat (2) @(negedge clk);
    check("unrestored resume flagged", err[2]);
    if (err[2]) n_unrestored++;
    m_err[2] = err[2];
    restart_ctrl(2);
    set_id(2, t_cur[2]);
    for (int s = 0; s < 5; s++) step(2, 1'b0);
    check_counts(2);
    // ---- phase 5: controller 3 disabled, its task is not counted
    m_ann[3] = '1; m_mask[3] = '1;
    set_id(4, 0);
    for (int s = 0; s < 5; s++) step(4, 1'b0);
    check("disabled quiet", !err[3]);
    apb_read(ra(3, REG_STATUS), d);
    check("disabled no count", d == 0);
    if (d == 0) n_ignored++;
    for (int c = 0; c < 2; c++) check_counts(c);
    $display("sets=%0d tests=%0d multiword=%0d singleword=%0d legal=%0d cfe=%0d watchdog=%0d irq=%0d lock=%0d context=%0d restart=%0d ignored=%0d resumed=%0d unrestored=%0d",
             n_set, n_test, n_multi, n_single, n_legal, n_cfe, n_wd, n_irq, n_lock, n_ctx, n_restart, n_ignored, n_resume, n_unrestored);
    if (n_set == 0 || n_test == 0 || n_multi == 0 || n_single == 0 || n_legal == 0 || n_cfe == 0 ||
        n_wd == 0 || n_irq == 0 || n_lock == 0 || n_ctx == 0 || n_restart == 0 || n_ignored == 0 || n_resume == 0 || n_unrestored == 0)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
