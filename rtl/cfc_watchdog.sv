// cfc_watchdog: timer of one controller.
//
// While `run` is high (controller enabled and Set/Test counts differ) the timer
// counts clock cycles; when counts agree it restarts from zero. If the count
// reaches `timeout` the sticky error wd_err is set: a Test that never follows its
// Set, a transfer that comes too late, or one that was not requested and is never
// paired. timeout = 0 turns the check off. The counter saturates at its maximum.
// On `capture` (a Test is detected) the cycles elapsed since the Set are stored in
// last_gap, for the software to read timing between Set and Test.
// Timing: wd_err rises in the cycle after the count equals timeout-1 while running,
// i.e. a mismatch of exactly `timeout` cycles trips it.
// The timeout rule follows the reference; the early limit of a full window
// watchdog is not built, and widths, saturation and last_gap are this design's own.
module cfc_watchdog #(
  parameter int unsigned TMO_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,     // restart: zero timer and error
  input  logic             run,       // counts mismatched and controller enabled
  input  logic [TMO_W-1:0] timeout,   // limit in cycles, 0 = off
  input  logic             capture,   // store the current gap
  output logic             wd_err,    // sticky timeout
  output logic [TMO_W-1:0] last_gap
);

  logic [TMO_W-1:0] tmr;
  logic [TMO_W-1:0] tmr_nxt;

  always_comb tmr_nxt = (tmr == '1) ? tmr : tmr + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tmr      <= '0;
      wd_err   <= 1'b0;
      last_gap <= '0;
    end else if (clear) begin
      tmr      <= '0;
      wd_err   <= 1'b0;
      last_gap <= '0;
    end else begin
      if (run) tmr <= tmr_nxt;
      else     tmr <= '0;
      if (run && timeout != '0 && tmr_nxt >= timeout) wd_err <= 1'b1;
      if (capture) last_gap <= tmr_nxt;
    end
  end

endmodule
