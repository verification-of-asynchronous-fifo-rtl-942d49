// sync_w2r: brings the write pointer into the read clock domain.
//
// Two flip-flop stages clocked by rclk capture the Gray-coded write pointer
// wptr, which changes with wclk. The first stage may go metastable; the second
// gives it a full rclk period to settle. Because wptr is Gray-coded, only one
// bit can be in flight at a time, so the value seen in the read domain is
// either the old pointer or the new one, never a mixture.
//
// Interface: rclk, rrst_n (asynchronous, active low, clears both stages),
// wptr (from the write domain), rq2_wptr (registered, synchronous to rclk).
//
// Timing: a change on wptr appears on rq2_wptr after two rising rclk edges
// (three if it misses the setup window of the first).
//
// The two-register structure follows the described synchronizer; the reset
// polarity is this design's choice.
module sync_w2r #(
  parameter int unsigned ADDRSIZE = fifo_pkg::FIFO_ASIZE
) (
  input  logic              rclk,
  input  logic              rrst_n,
  input  logic [ADDRSIZE:0] wptr,
  output logic [ADDRSIZE:0] rq2_wptr
);

  logic [ADDRSIZE:0] rq1_wptr;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) {rq2_wptr, rq1_wptr} <= '0;
    else         {rq2_wptr, rq1_wptr} <= {rq1_wptr, wptr};
  end

endmodule
