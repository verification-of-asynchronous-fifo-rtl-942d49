// rptr_empty: read pointer and empty flag, all in the read clock domain.
//
// The read pointer is a dual-register Gray counter (gray_counter) of
// ADDRSIZE+1 bits. Its binary value, less the wrap bit, is raddr, the memory
// read address. Its Gray value is rptr, sent to the write domain through
// sync_r2w. A read request rinc advances the pointer only while the FIFO is
// not empty, so reading an empty FIFO does nothing.
//
// The FIFO is empty when the read pointer has caught up with the write
// pointer, wrap bit included. The flag is registered: at each rclk edge rempty
// takes the result of comparing the pointer's next Gray value with rq2_wptr,
// the write pointer as seen through the synchronizer. Because that view lags
// the real write pointer, rempty may stay high for two or three rclk cycles
// after a write (a pessimistic but safe delay) and never falls early.
//
// Interface: rclk, rrst_n (asynchronous, active low: pointer to zero, rempty
// high), rinc, rq2_wptr in; rempty, raddr, rptr out, all registered
// (raddr is taken from the registered binary count).
//
// Timing: a read accepted at edge k moves raddr/rptr at edge k; rempty at edge
// k already reflects the pointer after that read.
//
// The pointer structure, the comparison on the next pointer and the
// registered flag follow the described design; ignoring reads while empty
// and the reset values are this design's choices.
module rptr_empty #(
  parameter int unsigned ADDRSIZE = fifo_pkg::FIFO_ASIZE
) (
  input  logic                rclk,
  input  logic                rrst_n,
  input  logic                rinc,
  input  logic [ADDRSIZE:0]   rq2_wptr,
  output logic                rempty,
  output logic [ADDRSIZE-1:0] raddr,
  output logic [ADDRSIZE:0]   rptr
);

  logic [ADDRSIZE:0] rbin, rgraynext;

  gray_counter #(.N(ADDRSIZE + 1)) u_rptr (
    .clk   (rclk),
    .rst_n (rrst_n),
    .inc   (rinc && !rempty),
    .bin   (rbin),
    .gray  (rptr),
    .bnext (),
    .gnext (rgraynext)
  );

  assign raddr = rbin[ADDRSIZE-1:0];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) rempty <= 1'b1;
    else         rempty <= (rgraynext == rq2_wptr);
  end

  // The pointer must stand still while the FIFO is empty.
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n)
    rempty |=> $stable(rptr));

endmodule
