// fifo_pkg: constants shared by the asynchronous FIFO modules.
//
// FIFO_DSIZE and FIFO_ASIZE are the default word width (8 bits) and address
// width (4 bits, 16 words) of the FIFO. Each pointer carries one extra bit,
// the wrap bit, above the address, so a pointer is FIFO_ASIZE+1 bits wide.
// The module parameters take these as their defaults.
package fifo_pkg;

  localparam int unsigned FIFO_DSIZE = 8;
  localparam int unsigned FIFO_ASIZE = 4;

endpackage
