// yacca_checker: the scalable YACCA logic of one controller.
//
// The bitmask is split by an input stage over N_SLICES identical replicas of
// SLICE_W bits (yacca_slice). An enable control selects how many replicas the
// monitored task needs, so the same hardware serves tasks with up to
// SLICE_W*N_SLICES basic blocks; an output stage ORs the errors of the enabled
// replicas. size_sel = k enables replicas 0..k-1; 0, or a value above N_SLICES,
// enables all of them. Combinational, no clock.
// The replica structure and the 8 x 25 size follow the reference; the size_sel
// encoding is this design's own.
module yacca_checker #(
  parameter int unsigned SLICE_W  = 8,
  parameter int unsigned N_SLICES = 25,
  parameter int unsigned SEL_W    = 5
) (
  input  logic [SLICE_W*N_SLICES-1:0] id,        // annotation bitmask
  input  logic [SLICE_W*N_SLICES-1:0] mask,      // predecessors mask
  input  logic [SEL_W-1:0]            size_sel,  // replicas in use
  output logic                        err        // YACCA error
);

  logic [N_SLICES-1:0] slice_err;  // raw replica outputs
  logic [N_SLICES-1:0] slice_en;   // enable control

  for (genvar s = 0; s < N_SLICES; s++) begin : g_slice
    yacca_slice #(.SLICE_W(SLICE_W)) u_slice (
      .id  (id  [s*SLICE_W +: SLICE_W]),
      .mask(mask[s*SLICE_W +: SLICE_W]),
      .err (slice_err[s])
    );
  end

  always_comb begin
    for (int unsigned s = 0; s < N_SLICES; s++) begin
      if (size_sel == '0 || 32'(size_sel) > N_SLICES) slice_en[s] = 1'b1;
      else                                             slice_en[s] = (s < 32'(size_sel));
    end
  end

  always_comb err = |(slice_err & slice_en);

endmodule
