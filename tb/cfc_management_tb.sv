// cfc_management_tb: register bank of the management block, over its APB-style port.
// Checks reset values, write/read-back of every setting of every controller, the
// cfg outputs, the one-cycle RESTART pulse, status and GAP read-back from status
// values the testbench drives, the ERR register, the interrupt and its enable,
// the INFO constants, and the LOCK rule: after LOCK, fixed controllers refuse
// setting writes (RESTART still works) and dynamic ones take them, and LOCK
// cannot be cleared.
module cfc_management_tb;
  import cfc_pkg::*;
  localparam int NC = 4;
  logic clk = 0, rst_n = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [11:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  logic pready;
  ctrl_cfg_t cfg [NC];
  logic [NC-1:0] restart, err, set_pulse, test_pulse;
  ctrl_status_t status [NC];
  logic irq;
  int checks = 0, failures = 0;
  int restarts_seen [NC];

  cfc_management #(.N_CTRL(NC), .SLICE_W(8), .N_SLICES(25)) dut (
    .clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready,
    .cfg, .restart, .status, .err, .set_pulse, .test_pulse, .irq);

  always #5 clk = ~clk;
  always @(posedge clk) for (int c = 0; c < NC; c++) if (rst_n && restart[c]) restarts_seen[c]++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic apb_write(logic [11:0] a, logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    @(negedge clk); psel = 0; penable = 0; pwrite = 0;
  endtask

  task automatic apb_read(logic [11:0] a, output logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge clk); penable = 1; #1 d = prdata;
    check("pready", pready);
    @(negedge clk); psel = 0; penable = 0;
  endtask

  function automatic logic [11:0] ra(int c, logic [2:0] r);
    return {1'b0, 6'(c), r, 2'b00};
  endfunction
  function automatic logic [11:0] ga(logic [2:0] r);
    return {1'b1, 6'd0, r, 2'b00};
  endfunction

  initial begin
    logic [31:0] d;
    logic [31:0] ab [NC], mb [NC], to [NC];
    for (int c = 0; c < NC; c++) begin status[c] = '0; restarts_seen[c] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // reset values
    for (int c = 0; c < NC; c++) begin
      apb_read(ra(c, REG_CTRL), d);      check("reset ctrl", d == 0);
      apb_read(ra(c, REG_ANN_BASE), d);  check("reset ann", d == 0);
    end
    apb_read(ga(GREG_INFO), d);
    check("info", d == {8'd0, 8'd25, 8'd8, 8'd4});
    // program every controller
    for (int c = 0; c < NC; c++) begin
      ab[c] = $urandom & 32'hffff_fffc;
      mb[c] = $urandom & 32'hffff_fffc;
      to[c] = $urandom_range(1, 65535);
      apb_write(ra(c, REG_ANN_BASE), ab[c]);
      apb_write(ra(c, REG_MASK_BASE), mb[c]);
      apb_write(ra(c, REG_TIMEOUT), to[c]);
      apb_write(ra(c, REG_CTRL), {19'd0, 5'(c + 3), 6'd0, 1'(c < 2), 1'b1});
    end
    for (int c = 0; c < NC; c++) begin
      apb_read(ra(c, REG_ANN_BASE), d);  check("ann rb", d == ab[c]);
      apb_read(ra(c, REG_MASK_BASE), d); check("mask rb", d == mb[c]);
      apb_read(ra(c, REG_TIMEOUT), d);   check("tmo rb", d == to[c]);
      apb_read(ra(c, REG_CTRL), d);
      check("ctrl rb", d == {19'd0, 5'(c + 3), 6'd0, 1'(c < 2), 1'b1});
      check("cfg out", cfg[c].enable && cfg[c].fixed == (c < 2) && cfg[c].size_sel == 5'(c + 3)
                       && cfg[c].ann_base == ab[c] && cfg[c].mask_base == mb[c]
                       && 32'(cfg[c].timeout) == to[c]);
    end
    // restart pulse, one cycle, only on the addressed controller
    apb_write(ra(2, REG_CTRL), {19'd0, 5'd5, 6'd0, 1'b0, 1'b1} | 32'h4);
    repeat (2) @(negedge clk);
    check("restart once", restarts_seen[2] == 1 && restarts_seen[0] == 0 && restarts_seen[1] == 0);
    apb_read(ra(2, REG_CTRL), d);
    check("restart reads 0", d[2] == 1'b0 && d[0] == 1'b1);
    // status and gap read-back, err, irq
    status[1].err = 1; status[1].cfe = 1; status[1].ann_cnt = 8'h5a; status[1].mask_cnt = 8'h59;
    status[1].last_gap = 16'h1234;
    status[3].set_pulse = 1; status[2].test_pulse = 1;
    #1;
    check("err out", err == 4'b0010 && set_pulse == 4'b1000 && test_pulse == 4'b0100);
    check("irq off", !irq);
    apb_read(ra(1, REG_STATUS), d); check("status rb", d == 32'h00595a03);
    apb_read(ra(1, REG_GAP), d);    check("gap rb", d == 32'h1234);
    apb_read(ga(GREG_ERR), d);      check("err reg", d == 32'h2);
    apb_write(ga(GREG_CTRL), 32'h2);
    #1 check("irq on", irq);
    status[1] = '0;
    #1 check("irq clears", !irq);
    // lock: fixed controllers 0,1 freeze, dynamic 2,3 stay writable
    apb_write(ga(GREG_CTRL), 32'h3);
    apb_read(ga(GREG_CTRL), d); check("locked", d == 32'h3);
    for (int c = 0; c < NC; c++) begin
      apb_write(ra(c, REG_ANN_BASE), 32'h4000_0000 + 32'(16*c));
      apb_write(ra(c, REG_CTRL), 32'h4);  // try to disable and restart
    end
    repeat (2) @(negedge clk);
    for (int c = 0; c < NC; c++) begin
      apb_read(ra(c, REG_ANN_BASE), d);
      if (c < 2) check("fixed keeps", d == ab[c] && cfg[c].enable);
      else       check("dynamic takes", d == 32'h4000_0000 + 32'(16*c) && !cfg[c].enable);
    end
    check("restart still works", restarts_seen[0] == 1 && restarts_seen[1] == 1
                                  && restarts_seen[2] == 2 && restarts_seen[3] == 1);
    apb_write(ga(GREG_CTRL), 32'h0);
    apb_read(ga(GREG_CTRL), d); check("lock sticks", d == 32'h1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
