// sync_r2w: brings the read pointer into the write clock domain.
//
// Two flip-flop stages clocked by wclk capture the Gray-coded read pointer
// rptr, which changes with rclk. The first stage may go metastable; the second
// gives it a full wclk period to settle. Because rptr is Gray-coded, only one
// bit can be in flight at a time, so the value seen in the write domain is
// either the old pointer or the new one, never a mixture.
//
// Interface: wclk, wrst_n (asynchronous, active low, clears both stages),
// rptr (from the read domain), wq2_rptr (registered, synchronous to wclk).
//
// Timing: a change on rptr appears on wq2_rptr after two rising wclk edges
// (three if it misses the setup window of the first).
//
// The two-register structure follows the described synchronizer; the reset
// polarity is this design's choice.
module sync_r2w #(
  parameter int unsigned ADDRSIZE = fifo_pkg::FIFO_ASIZE
) (
  input  logic              wclk,
  input  logic              wrst_n,
  input  logic [ADDRSIZE:0] rptr,
  output logic [ADDRSIZE:0] wq2_rptr
);

  logic [ADDRSIZE:0] wq1_rptr;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) {wq2_rptr, wq1_rptr} <= '0;
    else         {wq2_rptr, wq1_rptr} <= {wq1_rptr, rptr};
  end

endmodule
