// cfc_management: CFC controllers management block.
//
// It is the peripheral's only software-visible side: a register bank on an APB
// style slave (no wait states, no errors) that holds each controller's control
// settings, reports errors, counts and timing, raises one interrupt, and passes
// out the controllers' Set/Test pulses and error notifications.
// Controllers are fixed or dynamic. A fixed controller always checks the same task;
// once the global LOCK bit is set its settings can no longer be written until
// reset; only its RESTART bit, used to recover after an error, still works. A dynamic controller stays writable, so the scheduler re-programs it (new
// annotation/mask addresses, size, timeout, RESTART) at each context change, and
// more tasks than controllers can be monitored.
// Register map (byte addresses, 32-bit registers):
//   paddr[11]=0: controller c = paddr[10:5], register r = paddr[4:2]
//     r0 CTRL      [0] ENABLE, [1] FIXED, [2] RESTART (write 1, reads 0), [12:8] SIZE_SEL
//     r1 ANN_BASE  byte address of annotation word 0
//     r2 MASK_BASE byte address of mask word 0
//     r3 TIMEOUT   [15:0] watchdog limit in cycles, 0 = off
//     r4 STATUS    RO [0] ERR, [1] CFE, [2] WD_ERR, [15:8] SET count, [23:16] TEST count
//     r5 GAP       RO [15:0] cycles between the last Set and Test
//   paddr[11]=1: r0 GCTRL [0] LOCK (set only), [1] IRQ_EN
//                r1 ERR   RO one ERR bit per controller
//                r2 INFO  RO [7:0] controllers, [15:8] bits per replica, [23:16] replicas
// Timing: writes take effect at the end of the access phase; reads are
// combinational in the access phase; restart is a one-cycle pulse after the write.
// Fixed and dynamic controllers follow the reference; the bus, the map, LOCK and
// RESTART are this design's own.
module cfc_management
  import cfc_pkg::*;
#(
  parameter int unsigned N_CTRL   = 4,
  parameter int unsigned SLICE_W  = 8,   // reported in INFO
  parameter int unsigned N_SLICES = 25   // reported in INFO
) (
  input  logic                clk,
  input  logic                rst_n,
  // APB-style configuration port
  input  logic                psel,
  input  logic                penable,
  input  logic                pwrite,
  input  logic [11:0]         paddr,
  input  logic [31:0]         pwdata,
  output logic [31:0]         prdata,
  output logic                pready,
  // towards the controllers
  output ctrl_cfg_t           cfg     [N_CTRL],
  output logic [N_CTRL-1:0]   restart,
  input  ctrl_status_t        status  [N_CTRL],
  // outputs of the peripheral
  output logic [N_CTRL-1:0]   err,
  output logic [N_CTRL-1:0]   set_pulse,
  output logic [N_CTRL-1:0]   test_pulse,
  output logic                irq
);

  logic       wr;
  logic       glob;
  logic [5:0] cidx;
  logic [2:0] ridx;
  logic       lock, irq_en;

  always_comb begin
    wr     = psel && penable && pwrite;
    glob   = paddr[11];
    cidx   = paddr[10:5];
    ridx   = paddr[4:2];
    pready = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lock    <= 1'b0;
      irq_en  <= 1'b0;
      restart <= '0;
      for (int c = 0; c < N_CTRL; c++) cfg[c] <= '0;
    end else begin
      restart <= '0;
      if (wr && glob && ridx == GREG_CTRL) begin
        if (!lock) lock <= pwdata[0];
        irq_en <= pwdata[1];
      end
      for (int c = 0; c < N_CTRL; c++) begin
        if (wr && !glob && cidx == 6'(c) && lock && cfg[c].fixed) begin
          // locked fixed controller: only RESTART (error recovery) is honoured
          if (ridx == REG_CTRL) restart[c] <= pwdata[2];
        end else if (wr && !glob && cidx == 6'(c)) begin
          unique case (ridx)
            REG_CTRL: begin
              cfg[c].enable   <= pwdata[0];
              cfg[c].fixed    <= pwdata[1];
              restart[c]      <= pwdata[2];
              cfg[c].size_sel <= pwdata[8 +: SEL_W];
            end
            REG_ANN_BASE:  cfg[c].ann_base  <= pwdata;
            REG_MASK_BASE: cfg[c].mask_base <= pwdata;
            REG_TIMEOUT:   cfg[c].timeout   <= pwdata[TMO_W-1:0];
            default: ;
          endcase
        end
      end
    end
  end

  always_comb begin
    for (int c = 0; c < N_CTRL; c++) begin
      err[c]        = status[c].err;
      set_pulse[c]  = status[c].set_pulse;
      test_pulse[c] = status[c].test_pulse;
    end
    irq = irq_en && (|err);
  end

  // read mux
  always_comb begin
    prdata = '0;
    if (glob) begin
      unique case (ridx)
        GREG_CTRL: prdata = {30'd0, irq_en, lock};
        GREG_ERR:  prdata = 32'(err);
        GREG_INFO: prdata = {8'd0, 8'(N_SLICES), 8'(SLICE_W), 8'(N_CTRL)};
        default:   prdata = '0;
      endcase
    end else begin
      for (int c = 0; c < N_CTRL; c++) begin
        if (cidx == 6'(c)) begin
          unique case (ridx)
            REG_CTRL:      prdata = {19'd0, cfg[c].size_sel, 6'd0,
                                     cfg[c].fixed, cfg[c].enable};
            REG_ANN_BASE:  prdata = cfg[c].ann_base;
            REG_MASK_BASE: prdata = cfg[c].mask_base;
            REG_TIMEOUT:   prdata = 32'(cfg[c].timeout);
            REG_STATUS:    prdata = {8'd0, status[c].mask_cnt, status[c].ann_cnt,
                                     5'd0, status[c].wd_err, status[c].cfe,
                                     status[c].err};
            REG_GAP:       prdata = 32'(status[c].last_gap);
            default:       prdata = '0;
          endcase
        end
      end
    end
  end

  // APB rule: the access phase always follows a selected setup phase.
  property p_penable_needs_psel;
    @(posedge clk) disable iff (!rst_n) penable |-> psel;
  endproperty
  a_penable_needs_psel: assert property (p_penable_needs_psel)
    else $error("penable without psel");

endmodule
