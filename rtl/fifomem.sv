// fifomem: dual-port storage of the asynchronous FIFO.
//
// A register array of 2**ADDRSIZE words of DATASIZE bits. The write port is
// synchronous to wclk: the word on wdata is stored at waddr on a rising wclk
// edge when wclken is high and wfull is low, so a write offered while the FIFO
// is full is dropped here as well as in the pointer logic. The read port is
// asynchronous: rdata always shows the word at raddr, so the word the read
// pointer addresses is on the output as soon as it has been written, and the
// reader takes it in the same clock in which it raises its read request.
//
// Timing: write takes effect at the wclk edge; rdata follows raddr (and a
// write to that address) combinationally. The array is not reset.
//
// The storage as a register array and the combinational read follow the
// described memory and read-pointer behaviour; a vendor RAM macro could take
// its place with the same ports.
module fifomem #(
  parameter int unsigned DATASIZE = fifo_pkg::FIFO_DSIZE,
  parameter int unsigned ADDRSIZE = fifo_pkg::FIFO_ASIZE
) (
  input  logic                wclk,
  input  logic                wclken,
  input  logic                wfull,
  input  logic [ADDRSIZE-1:0] waddr,
  input  logic [DATASIZE-1:0] wdata,
  input  logic [ADDRSIZE-1:0] raddr,
  output logic [DATASIZE-1:0] rdata
);

  localparam int unsigned DEPTH = 1 << ADDRSIZE;

  logic [DATASIZE-1:0] mem [DEPTH];

  assign rdata = mem[raddr];

  always_ff @(posedge wclk) begin
    if (wclken && !wfull) mem[waddr] <= wdata;
  end

endmodule
