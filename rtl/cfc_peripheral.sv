// cfc_peripheral: YACCA control-flow-checking peripheral (top level).
//
// N_CTRL controllers each check one task's control flow by snooping the host's
// data-memory writes: hardened code writes a basic block's annotation (Set) and,
// on entering the next block, its predecessors mask (Test) to the addresses that
// controller is programmed with. Each controller counts the Sets and Tests, times
// the gap between them and applies the YACCA check |(ID & ~mask) over up to
// SLICE_W*N_SLICES basic blocks. A management block holds the settings, locks the
// fixed controllers and exposes errors, Set/Test pulses and an interrupt.
// Ports: the snooped write bus (bus_valid/bus_addr/bus_wdata, observed only), an
// APB-style register port, and per-controller err/set_pulse/test_pulse plus irq.
// Timing: a controller reacts one cycle after the snooped write; errors are sticky
// until the controller is restarted. Clocking, reset (asynchronous, active low)
// and all widths except the 8 x 25 replica size are this design's own.
module cfc_peripheral
  import cfc_pkg::*;
#(
  parameter int unsigned N_CTRL   = 4,
  parameter int unsigned SLICE_W  = 8,
  parameter int unsigned N_SLICES = 25
) (
  input  logic              clk,
  input  logic              rst_n,
  // snooped host data-memory write bus
  input  logic              bus_valid,
  input  logic [ADDR_W-1:0] bus_addr,
  input  logic [DATA_W-1:0] bus_wdata,
  // APB-style management port
  input  logic              psel,
  input  logic              penable,
  input  logic              pwrite,
  input  logic [11:0]       paddr,
  input  logic [31:0]       pwdata,
  output logic [31:0]       prdata,
  output logic              pready,
  // Set/Test outputs and error notifications
  output logic [N_CTRL-1:0] err,
  output logic [N_CTRL-1:0] set_pulse,
  output logic [N_CTRL-1:0] test_pulse,
  output logic              irq
);

  bus_wr_t             bus;
  ctrl_cfg_t           cfg    [N_CTRL];
  ctrl_status_t        status [N_CTRL];
  logic [N_CTRL-1:0]   restart;

  always_comb begin
    bus.valid = bus_valid;
    bus.addr  = bus_addr;
    bus.wdata = bus_wdata;
  end

  cfc_management #(.N_CTRL(N_CTRL), .SLICE_W(SLICE_W), .N_SLICES(N_SLICES)) u_mgmt (
    .clk, .rst_n,
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready,
    .cfg, .restart, .status,
    .err, .set_pulse, .test_pulse, .irq
  );

  for (genvar c = 0; c < N_CTRL; c++) begin : g_ctrl
    cfc_controller #(.SLICE_W(SLICE_W), .N_SLICES(N_SLICES)) u_ctrl (
      .clk, .rst_n,
      .bus,
      .cfg    (cfg[c]),
      .restart(restart[c]),
      .status (status[c])
    );
  end

endmodule
