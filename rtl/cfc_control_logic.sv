// cfc_control_logic: the checking part of one controller.
//
// The check is armed only while the controller is enabled and the Set and Test
// counts are equal, i.e. right after each Test, when the annotation holds the ID of
// the block just left and the mask holds the legal predecessors of the block being
// entered. Then the YACCA equation error = |(ID & ~mask) is evaluated by the
// scalable yacca_checker over the size_sel replicas in use. A failing check sets
// the sticky control-flow error `cfe`, cleared only by `clear` (restart) or reset.
// This catches an annotation or mask transferred with a wrong value.
// Timing: cfe rises one cycle after the counts become equal with a failing check.
// The arming rule and the equation follow the reference; stickiness is assumed.
module cfc_control_logic #(
  parameter int unsigned SLICE_W  = 8,
  parameter int unsigned N_SLICES = 25,
  parameter int unsigned SEL_W    = 5
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear,
  input  logic                        enable,
  input  logic                        match,     // Set count == Test count
  input  logic [SLICE_W*N_SLICES-1:0] id,        // captured annotation
  input  logic [SLICE_W*N_SLICES-1:0] mask,      // captured predecessors mask
  input  logic [SEL_W-1:0]            size_sel,
  output logic                        cfe        // sticky control-flow error
);

  logic yacca_err;

  yacca_checker #(.SLICE_W(SLICE_W), .N_SLICES(N_SLICES), .SEL_W(SEL_W)) u_check (
    .id      (id),
    .mask    (mask),
    .size_sel(size_sel),
    .err     (yacca_err)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                              cfe <= 1'b0;
    else if (clear)                          cfe <= 1'b0;
    else if (enable && match && yacca_err)   cfe <= 1'b1;
  end

endmodule
