// fifo1: asynchronous (dual-clock) FIFO, top level.
//
// Words written in the wclk domain are read, in the same order, in the rclk
// domain; the two clocks need have no relation. Storage is fifomem, a
// 2**ASIZE-word dual-port array. Each side owns a pointer of ASIZE+1 bits (the
// address plus a wrap bit) kept as a dual binary/Gray counter: wptr_full in
// the write domain, rptr_empty in the read domain. Only the Gray pointers
// cross between the domains, each through two flip-flops (sync_w2r, sync_r2w),
// and each side compares its own next pointer with the other side's
// synchronized pointer to produce a registered flag: wfull in the write domain,
// rempty in the read domain. Equal pointers mean empty; pointers equal in the
// address but one lap apart mean full.
//
// Interface, write side (wclk): wrst_n, winc, wdata in; wfull out. A word is
// taken at a rising wclk edge when winc is high and wfull low; a write while
// full is ignored. Read side (rclk): rrst_n, rinc in; rdata, rempty out. rdata
// shows the oldest unread word whenever rempty is low; rinc high at a rising
// rclk edge with rempty low removes it. A read while empty is ignored.
// Resets are asynchronous and active low; assert both together.
//
// Timing: a word written at a wclk edge clears rempty after the write pointer
// has passed two rclk flops, i.e. two to three rclk edges later, plus one for
// the registered flag; symmetrically for wfull after a read. Both sides can
// transfer one word per clock.
//
// The split into these five modules, their names and the flag scheme follow
// the described design; DSIZE=8 and ASIZE=4 (16 words) are the described
// sizes. Separate per-domain resets are this design's choice.
module fifo1 #(
  parameter int unsigned DSIZE = fifo_pkg::FIFO_DSIZE,
  parameter int unsigned ASIZE = fifo_pkg::FIFO_ASIZE
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             winc,
  input  logic [DSIZE-1:0] wdata,
  output logic             wfull,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rinc,
  output logic [DSIZE-1:0] rdata,
  output logic             rempty
);

  logic [ASIZE-1:0] waddr, raddr;
  logic [ASIZE:0]   wptr, rptr, wq2_rptr, rq2_wptr;

  sync_r2w #(.ADDRSIZE(ASIZE)) sync_r2w (
    .wclk     (wclk),
    .wrst_n   (wrst_n),
    .rptr     (rptr),
    .wq2_rptr (wq2_rptr)
  );

  sync_w2r #(.ADDRSIZE(ASIZE)) sync_w2r (
    .rclk     (rclk),
    .rrst_n   (rrst_n),
    .wptr     (wptr),
    .rq2_wptr (rq2_wptr)
  );

  fifomem #(.DATASIZE(DSIZE), .ADDRSIZE(ASIZE)) fifomem (
    .wclk   (wclk),
    .wclken (winc),
    .wfull  (wfull),
    .waddr  (waddr),
    .wdata  (wdata),
    .raddr  (raddr),
    .rdata  (rdata)
  );

  rptr_empty #(.ADDRSIZE(ASIZE)) rptr_empty (
    .rclk     (rclk),
    .rrst_n   (rrst_n),
    .rinc     (rinc),
    .rq2_wptr (rq2_wptr),
    .rempty   (rempty),
    .raddr    (raddr),
    .rptr     (rptr)
  );

  wptr_full #(.ADDRSIZE(ASIZE)) wptr_full (
    .wclk     (wclk),
    .wrst_n   (wrst_n),
    .winc     (winc),
    .wq2_rptr (wq2_rptr),
    .wfull    (wfull),
    .waddr    (waddr),
    .wptr     (wptr)
  );

endmodule
