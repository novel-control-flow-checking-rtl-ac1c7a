// write_sniffer: annotation or mask address-writing sniffer of one controller.
//
// It observes the host's data-memory write bus and never drives it, so the checked
// software cannot be disturbed by the monitor. The watched vector (an annotation or
// a predecessors mask of VEC_W bits) lives in N_WORDS consecutive 32-bit words from
// byte address `base`. A write to word k > 0 goes into a staging register; the
// write of word 0 completes the transfer: software writes the upper words (if the
// task needs them) first and word 0 last. Only then is `vec` loaded, all words at
// once, so the checker never sees half of a new vector next to half of the old one,
// and the write is reported as one detected function (Set for the annotation,
// Test for the mask). Upper words not rewritten keep their last staged value.
// Timing: commit is combinational, high in the cycle the word-0 write is on the
// bus, so that counters fed by it change at the same clock edge as `vec`; vec is
// registered and shows the new vector from the next cycle. `clear` zeroes vector
// and staging (controller restart) and masks commit.
// That the sniffer watches writes to the vectors' addresses follows the reference;
// the multi-word layout and the word-0 commit rule are this design's own.
module write_sniffer
  import cfc_pkg::*;
#(
  parameter int unsigned VEC_W = 200
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,   // synchronous clear of vec
  input  bus_wr_t           bus,     // snooped host write
  input  logic [ADDR_W-1:0] base,    // byte address of word 0
  output logic [VEC_W-1:0]  vec,     // captured vector
  output logic              commit   // word 0 written in this cycle
);

  localparam int unsigned N_WORDS = (VEC_W + DATA_W - 1) / DATA_W;
  localparam int unsigned PAD_W   = N_WORDS * DATA_W;

  logic [ADDR_W-1:0] offs;     // byte offset from base
  logic              hit;      // write inside the watched window
  logic [PAD_W-1:0]  stage_q;  // staged words; word 0 of it is unused
  logic [PAD_W-1:0]  vec_q;    // vector seen by the checker

  always_comb begin
    offs   = bus.addr - base;
    hit    = bus.valid && (offs[1:0] == 2'b00) && ((offs >> 2) < ADDR_W'(N_WORDS));
    commit = hit && (offs == '0) && !clear;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage_q <= '0;
      vec_q   <= '0;
    end else begin
      if (clear) begin
        stage_q <= '0;
        vec_q   <= '0;
      end else if (hit) begin
        if (offs == '0) begin
          vec_q <= stage_q;
          vec_q[DATA_W-1:0] <= bus.wdata;
        end
        for (int unsigned w = 1; w < N_WORDS; w++)
          if ((offs >> 2) == ADDR_W'(w)) stage_q[w*DATA_W +: DATA_W] <= bus.wdata;
      end
    end
  end

  assign vec = vec_q[VEC_W-1:0];

endmodule
