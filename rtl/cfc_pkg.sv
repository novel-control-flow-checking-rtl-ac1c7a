// cfc_pkg: types and constants shared by the YACCA control-flow-checking peripheral.
//
// The peripheral watches the data-memory writes of a host CPU. Hardened software
// announces each basic block by writing its annotation (a node-ID bitmask, the YACCA
// "Set") and, on entry to the next block, the mask of legal predecessors (the YACCA
// "Test"). The replica size (8 bits x 25 replicas) is a module parameter, not a
// package constant. The 32-bit bus, counter and timeout widths and the register map
// defined here are this design's own choices.
package cfc_pkg;

  localparam int unsigned DATA_W   = 32;  // host data bus width (RV32 class host)
  localparam int unsigned ADDR_W   = 32;  // host byte-address width
  localparam int unsigned CNT_W    = 8;   // Set / Test counter width
  localparam int unsigned TMO_W    = 16;  // watchdog timeout width (cycles)
  localparam int unsigned SEL_W    = 5;   // size-select field width, holds 0..31 replicas

  // One snooped write on the host's data-memory bus.
  typedef struct packed {
    logic              valid;  // a write is being performed this cycle
    logic [ADDR_W-1:0] addr;   // byte address, word aligned
    logic [DATA_W-1:0] wdata;  // written word
  } bus_wr_t;

  // Control settings of one controller, held by the management block.
  typedef struct packed {
    logic              enable;     // controller checks when set
    logic              fixed;      // fixed controller: locked once LOCK is set
    logic [SEL_W-1:0]  size_sel;   // number of YACCA replicas in use (0 = all)
    logic [ADDR_W-1:0] ann_base;   // byte address of annotation word 0
    logic [ADDR_W-1:0] mask_base;  // byte address of mask word 0
    logic [TMO_W-1:0]  timeout;    // watchdog limit in cycles (0 = off)
  } ctrl_cfg_t;

  // Status of one controller, seen by the management block.
  typedef struct packed {
    logic             err;         // cfe | wd_err
    logic             cfe;         // control-flow error from the YACCA check
    logic             wd_err;      // watchdog timeout
    logic             set_pulse;   // a Set (annotation write) was detected
    logic             test_pulse;  // a Test (mask write) was detected
    logic [CNT_W-1:0] ann_cnt;     // Set count
    logic [CNT_W-1:0] mask_cnt;    // Test count
    logic [TMO_W-1:0] last_gap;    // cycles from the last Set to the following Test
  } ctrl_status_t;

  // Management register offsets (word index inside a controller's 32-byte window).
  localparam logic [2:0] REG_CTRL      = 3'd0;
  localparam logic [2:0] REG_ANN_BASE  = 3'd1;
  localparam logic [2:0] REG_MASK_BASE = 3'd2;
  localparam logic [2:0] REG_TIMEOUT   = 3'd3;
  localparam logic [2:0] REG_STATUS    = 3'd4;
  localparam logic [2:0] REG_GAP       = 3'd5;
  // Global registers (paddr[11] = 1).
  localparam logic [2:0] GREG_CTRL     = 3'd0;
  localparam logic [2:0] GREG_ERR      = 3'd1;
  localparam logic [2:0] GREG_INFO     = 3'd2;

endpackage
