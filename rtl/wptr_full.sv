// wptr_full: write pointer and full flag, all in the write clock domain.
//
// The write pointer is a dual-register Gray counter (gray_counter) of
// ADDRSIZE+1 bits. Its binary value, less the wrap bit, is waddr, the memory
// write address. Its Gray value is wptr, sent to the read domain through
// sync_w2r. A write request winc advances the pointer only while the FIFO is
// not full, so a write into a full FIFO is dropped and cannot overwrite unread
// data.
//
// The FIFO is full when the write pointer is exactly one lap ahead of the read
// pointer: same address, opposite wrap bit. In Gray code with a wrap bit that
// means the two pointers differ in their two most significant bits and agree
// in all the others. The flag is registered: at each wclk edge wfull takes the
// result of comparing the pointer's next Gray value with wq2_rptr, the read
// pointer as seen through the synchronizer, with its two MSBs inverted. That
// view lags the real read pointer, so wfull may stay high for two or three
// wclk cycles after a read (pessimistic but safe) and never falls early.
//
// Interface: wclk, wrst_n (asynchronous, active low: pointer to zero, wfull
// low), winc, wq2_rptr in; wfull, waddr, wptr out, all registered.
//
// Timing: a write accepted at edge k moves waddr/wptr at edge k; wfull at edge
// k already reflects the pointer after that write.
//
// The pointer structure, the comparison on the next pointer with the MSBs
// modified, and the registered flag follow the described design; the reset
// values are this design's choice.
module wptr_full #(
  parameter int unsigned ADDRSIZE = fifo_pkg::FIFO_ASIZE
) (
  input  logic                wclk,
  input  logic                wrst_n,
  input  logic                winc,
  input  logic [ADDRSIZE:0]   wq2_rptr,
  output logic                wfull,
  output logic [ADDRSIZE-1:0] waddr,
  output logic [ADDRSIZE:0]   wptr
);

  logic [ADDRSIZE:0] wbin, wgraynext;
  logic [ADDRSIZE:0] wq2_rptr_full;

  gray_counter #(.N(ADDRSIZE + 1)) u_wptr (
    .clk   (wclk),
    .rst_n (wrst_n),
    .inc   (winc && !wfull),
    .bin   (wbin),
    .gray  (wptr),
    .bnext (),
    .gnext (wgraynext)
  );

  assign waddr = wbin[ADDRSIZE-1:0];

  // Read pointer one lap behind: the two MSBs inverted, the rest unchanged.
  assign wq2_rptr_full = wq2_rptr ^ {2'b11, {(ADDRSIZE - 1){1'b0}}};

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) wfull <= 1'b0;
    else         wfull <= (wgraynext == wq2_rptr_full);
  end

  // The pointer must stand still while the FIFO is full.
  a_no_overflow: assert property (@(posedge wclk) disable iff (!wrst_n)
    wfull |=> $stable(wptr));

endmodule
