// yacca_slice: one n-bit replica of the YACCA check.
//
// YACCA gives every basic block a one-hot node ID; the entry of a block carries the
// bitmask of its legal predecessors. The flow is wrong when the ID of the block just
// left has a bit that the predecessor mask lacks: err = |(id & ~mask). This replica
// checks SLICE_W bits of the two vectors. Purely combinational, no clock.
// The equation follows the reference; the 8-bit default is its replica size.
module yacca_slice #(
  parameter int unsigned SLICE_W = 8
) (
  input  logic [SLICE_W-1:0] id,    // slice of the annotation (node ID bitmask)
  input  logic [SLICE_W-1:0] mask,  // slice of the predecessors mask
  output logic               err    // an ID bit outside the mask
);

  always_comb err = |(id & ~mask);

endmodule
