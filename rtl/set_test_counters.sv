// set_test_counters: annotation (Set) and mask (Test) counters of one controller.
//
// Each detected Set or Test increments its own CNT_W-bit counter by one (wrapping).
// In a correct flow the software performs Set, Test, Set, Test, ..., so the counts
// are equal after every Test and differ by one between a Set and its Test. `match`
// (combinational from the registered counts) enables the YACCA check; a mismatch
// runs the watchdog. `clear` (controller restart) zeroes both counters.
// Counting every detected function follows the reference; the width is assumed.
module set_test_counters #(
  parameter int unsigned CNT_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             set_det,   // annotation write detected
  input  logic             test_det,  // mask write detected
  output logic [CNT_W-1:0] ann_cnt,
  output logic [CNT_W-1:0] mask_cnt,
  output logic             match
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ann_cnt  <= '0;
      mask_cnt <= '0;
    end else if (clear) begin
      ann_cnt  <= '0;
      mask_cnt <= '0;
    end else begin
      if (set_det)  ann_cnt  <= ann_cnt + 1'b1;
      if (test_det) mask_cnt <= mask_cnt + 1'b1;
    end
  end

  always_comb match = (ann_cnt == mask_cnt);

endmodule
