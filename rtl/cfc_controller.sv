// cfc_controller: one YACCA controller of the control-flow-checking peripheral.
//
// Two write sniffers watch the host's data-memory bus at the controller's
// annotation and mask addresses. Each detected annotation write is a Set, each
// detected mask write a Test; their counters tell the rest of the controller where
// the software is. While the counts differ (between a Set and its Test) the
// watchdog runs and flags a pairing that takes `timeout` cycles or more (missing,
// spurious or late transfers). When the counts agree, the control logic applies
// the YACCA check to the captured annotation and mask (wrong values).
// Interface: `cfg` holds the control settings written through the management
// block; `restart` clears vectors, counters and errors; `status` carries errors,
// counts, the last Set-to-Test gap and one-cycle Set/Test pulses.
// Timing: Set/Test pulses are combinational, in the cycle of the word-0 bus write;
// the captured vector and the counts change one cycle later, cfe one cycle after
// that. A disabled controller does not count, check or time.
// Counter and timer widths are the package's CNT_W and TMO_W.
// The block set and its linking follow the reference; the interfaces are assumed.
module cfc_controller
  import cfc_pkg::*;
#(
  parameter int unsigned SLICE_W  = 8,
  parameter int unsigned N_SLICES = 25
) (
  input  logic         clk,
  input  logic         rst_n,
  input  bus_wr_t      bus,
  input  ctrl_cfg_t    cfg,
  input  logic         restart,
  output ctrl_status_t status
);

  localparam int unsigned VEC_W = SLICE_W * N_SLICES;

  logic [VEC_W-1:0] ann_vec, mask_vec;
  logic             ann_commit, mask_commit;
  logic             set_det, test_det;
  logic [CNT_W-1:0] ann_cnt, mask_cnt;
  logic             match;
  logic             cfe, wd_err;
  logic [TMO_W-1:0] last_gap;

  write_sniffer #(.VEC_W(VEC_W)) u_ann_sniff (
    .clk, .rst_n, .clear(restart), .bus, .base(cfg.ann_base),
    .vec(ann_vec), .commit(ann_commit)
  );

  write_sniffer #(.VEC_W(VEC_W)) u_mask_sniff (
    .clk, .rst_n, .clear(restart), .bus, .base(cfg.mask_base),
    .vec(mask_vec), .commit(mask_commit)
  );

  always_comb begin
    set_det  = cfg.enable && ann_commit;
    test_det = cfg.enable && mask_commit;
  end

  set_test_counters #(.CNT_W(CNT_W)) u_cnt (
    .clk, .rst_n, .clear(restart), .set_det, .test_det,
    .ann_cnt, .mask_cnt, .match
  );

  cfc_watchdog #(.TMO_W(TMO_W)) u_wdt (
    .clk, .rst_n, .clear(restart),
    .run     (cfg.enable && !match),
    .timeout (cfg.timeout),
    .capture (test_det),
    .wd_err,
    .last_gap
  );

  cfc_control_logic #(.SLICE_W(SLICE_W), .N_SLICES(N_SLICES), .SEL_W(SEL_W)) u_ctl (
    .clk, .rst_n, .clear(restart),
    .enable  (cfg.enable),
    .match,
    .id      (ann_vec),
    .mask    (mask_vec),
    .size_sel(cfg.size_sel),
    .cfe
  );

  always_comb begin
    status            = '0;
    status.cfe        = cfe;
    status.wd_err     = wd_err;
    status.err        = cfe | wd_err;
    status.set_pulse  = set_det;
    status.test_pulse = test_det;
    status.ann_cnt    = ann_cnt;
    status.mask_cnt   = mask_cnt;
    status.last_gap   = last_gap;
  end

endmodule
