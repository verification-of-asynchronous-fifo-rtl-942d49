// fifo_rd_if: read-side signal bundle of the asynchronous FIFO testbench.
//
// Everything in this interface belongs to the read clock domain. The MON
// modport is what the read monitor (the receiver) uses; the DUT modport gives
// the directions seen by the FIFO. rinc is changed only on the falling edge
// of rclk; rdata and rempty are sampled there too, where they are stable.
interface fifo_rd_if #(
  parameter int unsigned DSIZE = fifo_pkg::FIFO_DSIZE
) (
  input logic rclk
);
  logic             rrst_n;
  logic             rinc;
  logic [DSIZE-1:0] rdata;
  logic             rempty;

  modport MON (input rclk, output rrst_n, output rinc, input rdata, input rempty);
  modport DUT (input rclk, input rrst_n, input rinc, output rdata, output rempty);
endinterface
