// fifo_wr_if: write-side signal bundle of the asynchronous FIFO testbench.
//
// Everything in this interface belongs to the write clock domain. The DRV
// modport is what the write driver uses; the DUT modport gives the directions
// seen by the FIFO. Inputs to the FIFO are changed only on the falling edge
// of wclk, so the FIFO samples stable values on the rising edge.
interface fifo_wr_if #(
  parameter int unsigned DSIZE = fifo_pkg::FIFO_DSIZE
) (
  input logic wclk
);
  logic             wrst_n;
  logic             winc;
  logic [DSIZE-1:0] wdata;
  logic             wfull;

  modport DRV (input wclk, output wrst_n, output winc, output wdata, input wfull);
  modport DUT (input wclk, input wrst_n, input winc, input wdata, output wfull);

  // A full FIFO must not lose the word being offered: the request stays up
  // (the driver retries) until it is accepted.
  a_hold_while_full: assert property (@(posedge wclk) disable iff (!wrst_n)
    (winc && wfull) |=> winc && $stable(wdata));
endinterface
